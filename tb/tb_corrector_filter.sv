// tb_corrector_filter: self-checking testbench for corrector_filter.
//
// Covers the default C_3 decimating by two on a 29-bit input, and C_1, C_2, C_4, C_5
// with and without the down-sampling by two.
// The expected output of every decimator is computed from its impulse
// response referred to the input rate, built by polynomial algebra in
// tb_ref_pkg (independent of the RTL), applied to the recorded input samples.
// Each output is also checked for its latency in clock cycles from the last
// input sample it contains, and the number of outputs must equal the number of
// inputs divided by M. The input valid strobe has random idle cycles. The
// stimulus runs through four phases: random full-range codes, a constant most
// negative run, a constant most positive run (these reach the full-scale
// output, the edge of the output word), and a random +-1 bitstream.
// A watchdog ends the run with a failure if it does not finish in time.
// The reference transfer functions are those of the published structures; the
// stimulus, the latency and output-count checks and the idle-cycle pattern
// are this testbench's own.
module tb_corrector_filter;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 400;
  localparam int NPHASE = 4;
  localparam int W_x29 = 29;
  logic x29_valid = 1'b0;
  logic signed [W_x29-1:0] x29_data = '0;
  int x29_n = 0;
  localparam int W_x8 = 8;
  logic x8_valid = 1'b0;
  logic signed [W_x8-1:0] x8_data = '0;
  int x8_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic c3_valid;
  logic signed [29+6-1:0] c3_data;
  dec_ref r_c3;
  int n_c3 = 0;
  int ext_c3 = 0;
  longint fs_c3;
  logic c1_valid;
  logic signed [14-1:0] c1_data;
  dec_ref r_c1;
  int n_c1 = 0;
  int ext_c1 = 0;
  longint fs_c1;
  logic c2_valid;
  logic signed [14-1:0] c2_data;
  dec_ref r_c2;
  int n_c2 = 0;
  int ext_c2 = 0;
  longint fs_c2;
  logic c4_valid;
  logic signed [15-1:0] c4_data;
  dec_ref r_c4;
  int n_c4 = 0;
  int ext_c4 = 0;
  longint fs_c4;
  logic c5_valid;
  logic signed [15-1:0] c5_data;
  dec_ref r_c5;
  int n_c5 = 0;
  int ext_c5 = 0;
  longint fs_c5;

  corrector_filter u_c3 (
    .clk, .rst_n, .in_valid(x29_valid), .in_data(x29_data),
    .out_valid(c3_valid), .out_data(c3_data)
  );

  corrector_filter #(.KC(1), .DEC(1), .WIN(8)) u_c1 (
    .clk, .rst_n, .in_valid(x8_valid), .in_data(x8_data),
    .out_valid(c1_valid), .out_data(c1_data)
  );

  corrector_filter #(.KC(2), .DEC(2), .WIN(8)) u_c2 (
    .clk, .rst_n, .in_valid(x8_valid), .in_data(x8_data),
    .out_valid(c2_valid), .out_data(c2_data)
  );

  corrector_filter #(.KC(4), .DEC(1), .WIN(8)) u_c4 (
    .clk, .rst_n, .in_valid(x8_valid), .in_data(x8_data),
    .out_valid(c4_valid), .out_data(c4_data)
  );

  corrector_filter #(.KC(5), .DEC(2), .WIN(8)) u_c5 (
    .clk, .rst_n, .in_valid(x8_valid), .in_data(x8_data),
    .out_valid(c5_valid), .out_data(c5_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x29_valid) r_c3.push(longint'(x29_data), cyc);
  always @(posedge clk) if (rst_n && x8_valid) r_c1.push(longint'(x8_data), cyc);
  always @(posedge clk) if (rst_n && x8_valid) r_c2.push(longint'(x8_data), cyc);
  always @(posedge clk) if (rst_n && x8_valid) r_c4.push(longint'(x8_data), cyc);
  always @(posedge clk) if (rst_n && x8_valid) r_c5.push(longint'(x8_data), cyc);

  always @(posedge clk) if (rst_n && c3_valid) begin : mon_c3
    int li;
    longint e;
    li = r_c3.last_index(n_c3);
    checks++;
    if (li >= r_c3.x.size()) begin
      failures++;
      $display("FAIL c3: output %0d before its input %0d", n_c3, li);
    end else begin
      e = r_c3.expected(n_c3);
      if (longint'(c3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL c3: output %0d = %0d, expected %0d", n_c3, c3_data, e);
      end
      checks++;
      if (cyc - r_c3.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL c3: latency %0d cycles, expected 1", cyc - r_c3.t[li]);
      end
      if (longint'(c3_data) == fs_c3) ext_c3++;
    end
    n_c3++;
  end

  always @(posedge clk) if (rst_n && c1_valid) begin : mon_c1
    int li;
    longint e;
    li = r_c1.last_index(n_c1);
    checks++;
    if (li >= r_c1.x.size()) begin
      failures++;
      $display("FAIL c1: output %0d before its input %0d", n_c1, li);
    end else begin
      e = r_c1.expected(n_c1);
      if (longint'(c1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL c1: output %0d = %0d, expected %0d", n_c1, c1_data, e);
      end
      checks++;
      if (cyc - r_c1.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL c1: latency %0d cycles, expected 1", cyc - r_c1.t[li]);
      end
      if (longint'(c1_data) == fs_c1) ext_c1++;
    end
    n_c1++;
  end

  always @(posedge clk) if (rst_n && c2_valid) begin : mon_c2
    int li;
    longint e;
    li = r_c2.last_index(n_c2);
    checks++;
    if (li >= r_c2.x.size()) begin
      failures++;
      $display("FAIL c2: output %0d before its input %0d", n_c2, li);
    end else begin
      e = r_c2.expected(n_c2);
      if (longint'(c2_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL c2: output %0d = %0d, expected %0d", n_c2, c2_data, e);
      end
      checks++;
      if (cyc - r_c2.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL c2: latency %0d cycles, expected 1", cyc - r_c2.t[li]);
      end
      if (longint'(c2_data) == fs_c2) ext_c2++;
    end
    n_c2++;
  end

  always @(posedge clk) if (rst_n && c4_valid) begin : mon_c4
    int li;
    longint e;
    li = r_c4.last_index(n_c4);
    checks++;
    if (li >= r_c4.x.size()) begin
      failures++;
      $display("FAIL c4: output %0d before its input %0d", n_c4, li);
    end else begin
      e = r_c4.expected(n_c4);
      if (longint'(c4_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL c4: output %0d = %0d, expected %0d", n_c4, c4_data, e);
      end
      checks++;
      if (cyc - r_c4.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL c4: latency %0d cycles, expected 1", cyc - r_c4.t[li]);
      end
      if (longint'(c4_data) == fs_c4) ext_c4++;
    end
    n_c4++;
  end

  always @(posedge clk) if (rst_n && c5_valid) begin : mon_c5
    int li;
    longint e;
    li = r_c5.last_index(n_c5);
    checks++;
    if (li >= r_c5.x.size()) begin
      failures++;
      $display("FAIL c5: output %0d before its input %0d", n_c5, li);
    end else begin
      e = r_c5.expected(n_c5);
      if (longint'(c5_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL c5: output %0d = %0d, expected %0d", n_c5, c5_data, e);
      end
      checks++;
      if (cyc - r_c5.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL c5: latency %0d cycles, expected 1", cyc - r_c5.t[li]);
      end
      if (longint'(c5_data) == fs_c5) ext_c5++;
    end
    n_c5++;
  end

  function automatic longint stim(int phase, int w, int sid);
    longint lo = -(longint'(1) <<< (w - 1));
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    case (phase)
      0: return lo + longint'($urandom_range(0, 32'((longint'(1) <<< w) - 1)));
      1: return lo;
      2: return hi;
      3: return ($urandom_range(0, 1) == 1) ? 1 : -1;
      default: return model_sample(sid);
    endcase
  endfunction

  initial begin : watchdog
    repeat (RUN * NPHASE * 3 + 20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    r_c3 = new(ck(3), 2);
    begin
      automatic longint sh = 0;
      foreach (r_c3.h[j]) sh += r_c3.h[j];
      fs_c3 = -(longint'(1) <<< (W_x29 - 1)) * sh;
    end
    r_c1 = new(ck(1), 1);
    begin
      automatic longint sh = 0;
      foreach (r_c1.h[j]) sh += r_c1.h[j];
      fs_c1 = -(longint'(1) <<< (W_x8 - 1)) * sh;
    end
    r_c2 = new(ck(2), 2);
    begin
      automatic longint sh = 0;
      foreach (r_c2.h[j]) sh += r_c2.h[j];
      fs_c2 = -(longint'(1) <<< (W_x8 - 1)) * sh;
    end
    r_c4 = new(ck(4), 1);
    begin
      automatic longint sh = 0;
      foreach (r_c4.h[j]) sh += r_c4.h[j];
      fs_c4 = -(longint'(1) <<< (W_x8 - 1)) * sh;
    end
    r_c5 = new(ck(5), 2);
    begin
      automatic longint sh = 0;
      foreach (r_c5.h[j]) sh += r_c5.h[j];
      fs_c5 = -(longint'(1) <<< (W_x8 - 1)) * sh;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < NPHASE; ph++)
      for (int i = 0; i < RUN; i++) begin
        @(negedge clk);
        x29_valid = ($urandom_range(0, 3) != 0);
        if (x29_valid) begin
          x29_data = W_x29'(stim(ph, W_x29, 0));
          x29_n++;
        end else idle_cycles++;
        x8_valid = ($urandom_range(0, 3) != 0);
        if (x8_valid) begin
          x8_data = W_x8'(stim(ph, W_x8, 1));
          x8_n++;
        end else idle_cycles++;
      end
    @(negedge clk);
    x29_valid = 1'b0;
    x8_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_c3 != x29_n / 2) begin
      failures++;
      $display("FAIL c3: %0d outputs for %0d inputs", n_c3, x29_n);
    end
    checks++;
    if (n_c1 != x8_n / 1) begin
      failures++;
      $display("FAIL c1: %0d outputs for %0d inputs", n_c1, x8_n);
    end
    checks++;
    if (n_c2 != x8_n / 2) begin
      failures++;
      $display("FAIL c2: %0d outputs for %0d inputs", n_c2, x8_n);
    end
    checks++;
    if (n_c4 != x8_n / 1) begin
      failures++;
      $display("FAIL c4: %0d outputs for %0d inputs", n_c4, x8_n);
    end
    checks++;
    if (n_c5 != x8_n / 2) begin
      failures++;
      $display("FAIL c5: %0d outputs for %0d inputs", n_c5, x8_n);
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
