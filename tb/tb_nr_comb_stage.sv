// tb_nr_comb_stage: self-checking testbench for nr_comb_stage.
//
// Covers the default (N=2, K=3) and the N=3, K=5 and K=1 variants.
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
module tb_nr_comb_stage;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 300;
  localparam int NPHASE = 4;
  localparam int W_x2 = 2;
  logic x2_valid = 1'b0;
  logic signed [W_x2-1:0] x2_data = '0;
  int x2_n = 0;
  localparam int W_x4 = 4;
  logic x4_valid = 1'b0;
  logic signed [W_x4-1:0] x4_data = '0;
  int x4_n = 0;
  localparam int W_x3 = 3;
  logic x3_valid = 1'b0;
  logic signed [W_x3-1:0] x3_data = '0;
  int x3_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic n2k3_valid;
  logic signed [2+decim_pkg::growth_bits(2,3)-1:0] n2k3_data;
  dec_ref r_n2k3;
  int n_n2k3 = 0;
  int ext_n2k3 = 0;
  longint fs_n2k3;
  logic n3k3_valid;
  logic signed [2+decim_pkg::growth_bits(3,3)-1:0] n3k3_data;
  dec_ref r_n3k3;
  int n_n3k3 = 0;
  int ext_n3k3 = 0;
  longint fs_n3k3;
  logic n2k5_valid;
  logic signed [4+decim_pkg::growth_bits(2,5)-1:0] n2k5_data;
  dec_ref r_n2k5;
  int n_n2k5 = 0;
  int ext_n2k5 = 0;
  longint fs_n2k5;
  logic n3k1_valid;
  logic signed [3+decim_pkg::growth_bits(3,1)-1:0] n3k1_data;
  dec_ref r_n3k1;
  int n_n3k1 = 0;
  int ext_n3k1 = 0;
  longint fs_n3k1;

  nr_comb_stage u_n2k3 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(n2k3_valid), .out_data(n2k3_data)
  );

  nr_comb_stage #(.N(3), .K(3), .WIN(2)) u_n3k3 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(n3k3_valid), .out_data(n3k3_data)
  );

  nr_comb_stage #(.N(2), .K(5), .WIN(4)) u_n2k5 (
    .clk, .rst_n, .in_valid(x4_valid), .in_data(x4_data),
    .out_valid(n2k5_valid), .out_data(n2k5_data)
  );

  nr_comb_stage #(.N(3), .K(1), .WIN(3)) u_n3k1 (
    .clk, .rst_n, .in_valid(x3_valid), .in_data(x3_data),
    .out_valid(n3k1_valid), .out_data(n3k1_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x2_valid) r_n2k3.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_n3k3.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x4_valid) r_n2k5.push(longint'(x4_data), cyc);
  always @(posedge clk) if (rst_n && x3_valid) r_n3k1.push(longint'(x3_data), cyc);

  always @(posedge clk) if (rst_n && n2k3_valid) begin : mon_n2k3
    int li;
    longint e;
    li = r_n2k3.last_index(n_n2k3);
    checks++;
    if (li >= r_n2k3.x.size()) begin
      failures++;
      $display("FAIL n2k3: output %0d before its input %0d", n_n2k3, li);
    end else begin
      e = r_n2k3.expected(n_n2k3);
      if (longint'(n2k3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL n2k3: output %0d = %0d, expected %0d", n_n2k3, n2k3_data, e);
      end
      checks++;
      if (cyc - r_n2k3.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL n2k3: latency %0d cycles, expected 1", cyc - r_n2k3.t[li]);
      end
      if (longint'(n2k3_data) == fs_n2k3) ext_n2k3++;
    end
    n_n2k3++;
  end

  always @(posedge clk) if (rst_n && n3k3_valid) begin : mon_n3k3
    int li;
    longint e;
    li = r_n3k3.last_index(n_n3k3);
    checks++;
    if (li >= r_n3k3.x.size()) begin
      failures++;
      $display("FAIL n3k3: output %0d before its input %0d", n_n3k3, li);
    end else begin
      e = r_n3k3.expected(n_n3k3);
      if (longint'(n3k3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL n3k3: output %0d = %0d, expected %0d", n_n3k3, n3k3_data, e);
      end
      checks++;
      if (cyc - r_n3k3.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL n3k3: latency %0d cycles, expected 1", cyc - r_n3k3.t[li]);
      end
      if (longint'(n3k3_data) == fs_n3k3) ext_n3k3++;
    end
    n_n3k3++;
  end

  always @(posedge clk) if (rst_n && n2k5_valid) begin : mon_n2k5
    int li;
    longint e;
    li = r_n2k5.last_index(n_n2k5);
    checks++;
    if (li >= r_n2k5.x.size()) begin
      failures++;
      $display("FAIL n2k5: output %0d before its input %0d", n_n2k5, li);
    end else begin
      e = r_n2k5.expected(n_n2k5);
      if (longint'(n2k5_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL n2k5: output %0d = %0d, expected %0d", n_n2k5, n2k5_data, e);
      end
      checks++;
      if (cyc - r_n2k5.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL n2k5: latency %0d cycles, expected 1", cyc - r_n2k5.t[li]);
      end
      if (longint'(n2k5_data) == fs_n2k5) ext_n2k5++;
    end
    n_n2k5++;
  end

  always @(posedge clk) if (rst_n && n3k1_valid) begin : mon_n3k1
    int li;
    longint e;
    li = r_n3k1.last_index(n_n3k1);
    checks++;
    if (li >= r_n3k1.x.size()) begin
      failures++;
      $display("FAIL n3k1: output %0d before its input %0d", n_n3k1, li);
    end else begin
      e = r_n3k1.expected(n_n3k1);
      if (longint'(n3k1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL n3k1: output %0d = %0d, expected %0d", n_n3k1, n3k1_data, e);
      end
      checks++;
      if (cyc - r_n3k1.t[li] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL n3k1: latency %0d cycles, expected 1", cyc - r_n3k1.t[li]);
      end
      if (longint'(n3k1_data) == fs_n3k1) ext_n3k1++;
    end
    n_n3k1++;
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
    r_n2k3 = new(ppow(box(2), 3), 2);
    begin
      automatic longint sh = 0;
      foreach (r_n2k3.h[j]) sh += r_n2k3.h[j];
      fs_n2k3 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_n3k3 = new(ppow(box(3), 3), 3);
    begin
      automatic longint sh = 0;
      foreach (r_n3k3.h[j]) sh += r_n3k3.h[j];
      fs_n3k3 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_n2k5 = new(ppow(box(2), 5), 2);
    begin
      automatic longint sh = 0;
      foreach (r_n2k5.h[j]) sh += r_n2k5.h[j];
      fs_n2k5 = -(longint'(1) <<< (W_x4 - 1)) * sh;
    end
    r_n3k1 = new(ppow(box(3), 1), 3);
    begin
      automatic longint sh = 0;
      foreach (r_n3k1.h[j]) sh += r_n3k1.h[j];
      fs_n3k1 = -(longint'(1) <<< (W_x3 - 1)) * sh;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < NPHASE; ph++)
      for (int i = 0; i < RUN; i++) begin
        @(negedge clk);
        x2_valid = ($urandom_range(0, 3) != 0);
        if (x2_valid) begin
          x2_data = W_x2'(stim(ph, W_x2, 0));
          x2_n++;
        end else idle_cycles++;
        x4_valid = ($urandom_range(0, 3) != 0);
        if (x4_valid) begin
          x4_data = W_x4'(stim(ph, W_x4, 1));
          x4_n++;
        end else idle_cycles++;
        x3_valid = ($urandom_range(0, 3) != 0);
        if (x3_valid) begin
          x3_data = W_x3'(stim(ph, W_x3, 2));
          x3_n++;
        end else idle_cycles++;
      end
    @(negedge clk);
    x2_valid = 1'b0;
    x4_valid = 1'b0;
    x3_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_n2k3 != x2_n / 2) begin
      failures++;
      $display("FAIL n2k3: %0d outputs for %0d inputs", n_n2k3, x2_n);
    end
    checks++;
    if (ext_n2k3 == 0) begin
      failures++;
      $display("FAIL n2k3: full-scale output never reached");
    end
    checks++;
    if (n_n3k3 != x2_n / 3) begin
      failures++;
      $display("FAIL n3k3: %0d outputs for %0d inputs", n_n3k3, x2_n);
    end
    checks++;
    if (ext_n3k3 == 0) begin
      failures++;
      $display("FAIL n3k3: full-scale output never reached");
    end
    checks++;
    if (n_n2k5 != x4_n / 2) begin
      failures++;
      $display("FAIL n2k5: %0d outputs for %0d inputs", n_n2k5, x4_n);
    end
    checks++;
    if (ext_n2k5 == 0) begin
      failures++;
      $display("FAIL n2k5: full-scale output never reached");
    end
    checks++;
    if (n_n3k1 != x3_n / 3) begin
      failures++;
      $display("FAIL n3k1: %0d outputs for %0d inputs", n_n3k1, x3_n);
    end
    checks++;
    if (ext_n3k1 == 0) begin
      failures++;
      $display("FAIL n3k1: full-scale output never reached");
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
