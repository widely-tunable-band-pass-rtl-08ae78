// tb_cic_decimator: self-checking testbench for cic_decimator.
//
// Covers the default (R=128, D=1, K=3, 14-bit input) and R=5 with differential delay 2, R=24 with K=4 and R=7 with K=2.
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
module tb_cic_decimator;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 1600;
  localparam int NPHASE = 4;
  localparam int W_x14 = 14;
  logic x14_valid = 1'b0;
  logic signed [W_x14-1:0] x14_data = '0;
  int x14_n = 0;
  localparam int W_x3 = 3;
  logic x3_valid = 1'b0;
  logic signed [W_x3-1:0] x3_data = '0;
  int x3_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic r128_valid;
  logic signed [14+decim_pkg::growth_bits(128,3)-1:0] r128_data;
  dec_ref r_r128;
  int n_r128 = 0;
  int ext_r128 = 0;
  longint fs_r128;
  logic r5d2k3_valid;
  logic signed [3+decim_pkg::growth_bits(10,3)-1:0] r5d2k3_data;
  dec_ref r_r5d2k3;
  int n_r5d2k3 = 0;
  int ext_r5d2k3 = 0;
  longint fs_r5d2k3;
  logic r24d1k4_valid;
  logic signed [3+decim_pkg::growth_bits(24,4)-1:0] r24d1k4_data;
  dec_ref r_r24d1k4;
  int n_r24d1k4 = 0;
  int ext_r24d1k4 = 0;
  longint fs_r24d1k4;
  logic r7d1k2_valid;
  logic signed [3+decim_pkg::growth_bits(7,2)-1:0] r7d1k2_data;
  dec_ref r_r7d1k2;
  int n_r7d1k2 = 0;
  int ext_r7d1k2 = 0;
  longint fs_r7d1k2;

  cic_decimator u_r128 (
    .clk, .rst_n, .in_valid(x14_valid), .in_data(x14_data),
    .out_valid(r128_valid), .out_data(r128_data)
  );

  cic_decimator #(.R(5), .D(2), .K(3), .WIN(3)) u_r5d2k3 (
    .clk, .rst_n, .in_valid(x3_valid), .in_data(x3_data),
    .out_valid(r5d2k3_valid), .out_data(r5d2k3_data)
  );

  cic_decimator #(.R(24), .D(1), .K(4), .WIN(3)) u_r24d1k4 (
    .clk, .rst_n, .in_valid(x3_valid), .in_data(x3_data),
    .out_valid(r24d1k4_valid), .out_data(r24d1k4_data)
  );

  cic_decimator #(.R(7), .D(1), .K(2), .WIN(3)) u_r7d1k2 (
    .clk, .rst_n, .in_valid(x3_valid), .in_data(x3_data),
    .out_valid(r7d1k2_valid), .out_data(r7d1k2_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x14_valid) r_r128.push(longint'(x14_data), cyc);
  always @(posedge clk) if (rst_n && x3_valid) r_r5d2k3.push(longint'(x3_data), cyc);
  always @(posedge clk) if (rst_n && x3_valid) r_r24d1k4.push(longint'(x3_data), cyc);
  always @(posedge clk) if (rst_n && x3_valid) r_r7d1k2.push(longint'(x3_data), cyc);

  always @(posedge clk) if (rst_n && r128_valid) begin : mon_r128
    int li;
    longint e;
    li = r_r128.last_index(n_r128);
    checks++;
    if (li >= r_r128.x.size()) begin
      failures++;
      $display("FAIL r128: output %0d before its input %0d", n_r128, li);
    end else begin
      e = r_r128.expected(n_r128);
      if (longint'(r128_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL r128: output %0d = %0d, expected %0d", n_r128, r128_data, e);
      end
      checks++;
      if (cyc - r_r128.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL r128: latency %0d cycles, expected 1", cyc - r_r128.t[li]);
      end
      if (longint'(r128_data) == fs_r128) ext_r128++;
    end
    n_r128++;
  end

  always @(posedge clk) if (rst_n && r5d2k3_valid) begin : mon_r5d2k3
    int li;
    longint e;
    li = r_r5d2k3.last_index(n_r5d2k3);
    checks++;
    if (li >= r_r5d2k3.x.size()) begin
      failures++;
      $display("FAIL r5d2k3: output %0d before its input %0d", n_r5d2k3, li);
    end else begin
      e = r_r5d2k3.expected(n_r5d2k3);
      if (longint'(r5d2k3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL r5d2k3: output %0d = %0d, expected %0d", n_r5d2k3, r5d2k3_data, e);
      end
      checks++;
      if (cyc - r_r5d2k3.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL r5d2k3: latency %0d cycles, expected 1", cyc - r_r5d2k3.t[li]);
      end
      if (longint'(r5d2k3_data) == fs_r5d2k3) ext_r5d2k3++;
    end
    n_r5d2k3++;
  end

  always @(posedge clk) if (rst_n && r24d1k4_valid) begin : mon_r24d1k4
    int li;
    longint e;
    li = r_r24d1k4.last_index(n_r24d1k4);
    checks++;
    if (li >= r_r24d1k4.x.size()) begin
      failures++;
      $display("FAIL r24d1k4: output %0d before its input %0d", n_r24d1k4, li);
    end else begin
      e = r_r24d1k4.expected(n_r24d1k4);
      if (longint'(r24d1k4_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL r24d1k4: output %0d = %0d, expected %0d", n_r24d1k4, r24d1k4_data, e);
      end
      checks++;
      if (cyc - r_r24d1k4.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL r24d1k4: latency %0d cycles, expected 1", cyc - r_r24d1k4.t[li]);
      end
      if (longint'(r24d1k4_data) == fs_r24d1k4) ext_r24d1k4++;
    end
    n_r24d1k4++;
  end

  always @(posedge clk) if (rst_n && r7d1k2_valid) begin : mon_r7d1k2
    int li;
    longint e;
    li = r_r7d1k2.last_index(n_r7d1k2);
    checks++;
    if (li >= r_r7d1k2.x.size()) begin
      failures++;
      $display("FAIL r7d1k2: output %0d before its input %0d", n_r7d1k2, li);
    end else begin
      e = r_r7d1k2.expected(n_r7d1k2);
      if (longint'(r7d1k2_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL r7d1k2: output %0d = %0d, expected %0d", n_r7d1k2, r7d1k2_data, e);
      end
      checks++;
      if (cyc - r_r7d1k2.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL r7d1k2: latency %0d cycles, expected 1", cyc - r_r7d1k2.t[li]);
      end
      if (longint'(r7d1k2_data) == fs_r7d1k2) ext_r7d1k2++;
    end
    n_r7d1k2++;
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
    r_r128 = new(ppow(box(128), 3), 128);
    begin
      automatic longint sh = 0;
      foreach (r_r128.h[j]) sh += r_r128.h[j];
      fs_r128 = -(longint'(1) <<< (W_x14 - 1)) * sh;
    end
    r_r5d2k3 = new(ppow(box(10), 3), 5);
    begin
      automatic longint sh = 0;
      foreach (r_r5d2k3.h[j]) sh += r_r5d2k3.h[j];
      fs_r5d2k3 = -(longint'(1) <<< (W_x3 - 1)) * sh;
    end
    r_r24d1k4 = new(ppow(box(24), 4), 24);
    begin
      automatic longint sh = 0;
      foreach (r_r24d1k4.h[j]) sh += r_r24d1k4.h[j];
      fs_r24d1k4 = -(longint'(1) <<< (W_x3 - 1)) * sh;
    end
    r_r7d1k2 = new(ppow(box(7), 2), 7);
    begin
      automatic longint sh = 0;
      foreach (r_r7d1k2.h[j]) sh += r_r7d1k2.h[j];
      fs_r7d1k2 = -(longint'(1) <<< (W_x3 - 1)) * sh;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < NPHASE; ph++)
      for (int i = 0; i < RUN; i++) begin
        @(negedge clk);
        x14_valid = ($urandom_range(0, 3) != 0);
        if (x14_valid) begin
          x14_data = W_x14'(stim(ph, W_x14, 0));
          x14_n++;
        end else idle_cycles++;
        x3_valid = ($urandom_range(0, 3) != 0);
        if (x3_valid) begin
          x3_data = W_x3'(stim(ph, W_x3, 1));
          x3_n++;
        end else idle_cycles++;
      end
    @(negedge clk);
    x14_valid = 1'b0;
    x3_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_r128 != x14_n / 128) begin
      failures++;
      $display("FAIL r128: %0d outputs for %0d inputs", n_r128, x14_n);
    end
    checks++;
    if (ext_r128 == 0) begin
      failures++;
      $display("FAIL r128: full-scale output never reached");
    end
    checks++;
    if (n_r5d2k3 != x3_n / 5) begin
      failures++;
      $display("FAIL r5d2k3: %0d outputs for %0d inputs", n_r5d2k3, x3_n);
    end
    checks++;
    if (ext_r5d2k3 == 0) begin
      failures++;
      $display("FAIL r5d2k3: full-scale output never reached");
    end
    checks++;
    if (n_r24d1k4 != x3_n / 24) begin
      failures++;
      $display("FAIL r24d1k4: %0d outputs for %0d inputs", n_r24d1k4, x3_n);
    end
    checks++;
    if (ext_r24d1k4 == 0) begin
      failures++;
      $display("FAIL r24d1k4: full-scale output never reached");
    end
    checks++;
    if (n_r7d1k2 != x3_n / 7) begin
      failures++;
      $display("FAIL r7d1k2: %0d outputs for %0d inputs", n_r7d1k2, x3_n);
    end
    checks++;
    if (ext_r7d1k2 == 0) begin
      failures++;
      $display("FAIL r7d1k2: full-scale output never reached");
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
