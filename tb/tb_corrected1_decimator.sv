// tb_corrected1_decimator: self-checking testbench for corrected1_decimator.
//
// Reference: H_P(z) C_K(z^(M/2)) for the default (M1=4, M2=128, K=3, C_3) and for
// M1=2, M2=16, K=2 with C_2.
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
module tb_corrected1_decimator;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 6144;
  localparam int NPHASE = 4;
  localparam int W_x3 = 3;
  logic x3_valid = 1'b0;
  logic signed [W_x3-1:0] x3_data = '0;
  int x3_n = 0;
  localparam int W_x2 = 2;
  logic x2_valid = 1'b0;
  logic signed [W_x2-1:0] x2_data = '0;
  int x2_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic cor1_valid;
  logic signed [3+6+21+6-1:0] cor1_data;
  dec_ref r_cor1;
  int n_cor1 = 0;
  int ext_cor1 = 0;
  longint fs_cor1;
  logic cor1k2_valid;
  logic signed [18-1:0] cor1k2_data;
  dec_ref r_cor1k2;
  int n_cor1k2 = 0;
  int ext_cor1k2 = 0;
  longint fs_cor1k2;

  corrected1_decimator u_cor1 (
    .clk, .rst_n, .in_valid(x3_valid), .in_data(x3_data),
    .out_valid(cor1_valid), .out_data(cor1_data)
  );

  corrected1_decimator #(.K(2), .WIN(2), .N_DEC2(1), .M2(16)) u_cor1k2 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(cor1k2_valid), .out_data(cor1k2_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x3_valid) r_cor1.push(longint'(x3_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_cor1k2.push(longint'(x2_data), cyc);

  always @(posedge clk) if (rst_n && cor1_valid) begin : mon_cor1
    int li;
    longint e;
    li = r_cor1.last_index(n_cor1);
    checks++;
    if (li >= r_cor1.x.size()) begin
      failures++;
      $display("FAIL cor1: output %0d before its input %0d", n_cor1, li);
    end else begin
      e = r_cor1.expected(n_cor1);
      if (longint'(cor1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cor1: output %0d = %0d, expected %0d", n_cor1, cor1_data, e);
      end
      checks++;
      if (cyc - r_cor1.t[li] != 4) begin
        failures++;
        if (failures < 10) $display("FAIL cor1: latency %0d cycles, expected 4", cyc - r_cor1.t[li]);
      end
      if (longint'(cor1_data) == fs_cor1) ext_cor1++;
    end
    n_cor1++;
  end

  always @(posedge clk) if (rst_n && cor1k2_valid) begin : mon_cor1k2
    int li;
    longint e;
    li = r_cor1k2.last_index(n_cor1k2);
    checks++;
    if (li >= r_cor1k2.x.size()) begin
      failures++;
      $display("FAIL cor1k2: output %0d before its input %0d", n_cor1k2, li);
    end else begin
      e = r_cor1k2.expected(n_cor1k2);
      if (longint'(cor1k2_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cor1k2: output %0d = %0d, expected %0d", n_cor1k2, cor1k2_data, e);
      end
      checks++;
      if (cyc - r_cor1k2.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL cor1k2: latency %0d cycles, expected 3", cyc - r_cor1k2.t[li]);
      end
      if (longint'(cor1k2_data) == fs_cor1k2) ext_cor1k2++;
    end
    n_cor1k2++;
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
    r_cor1 = new(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(128), 3), 4)), upsample(ck(3), 256)), 512);
    begin
      automatic longint sh = 0;
      foreach (r_cor1.h[j]) sh += r_cor1.h[j];
      fs_cor1 = -(longint'(1) <<< (W_x3 - 1)) * sh;
    end
    r_cor1k2 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 2), 1)), upsample(ppow(box(16), 2), 2)), upsample(ck(2), 16)), 32);
    begin
      automatic longint sh = 0;
      foreach (r_cor1k2.h[j]) sh += r_cor1k2.h[j];
      fs_cor1k2 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < NPHASE; ph++)
      for (int i = 0; i < RUN; i++) begin
        @(negedge clk);
        x3_valid = ($urandom_range(0, 3) != 0);
        if (x3_valid) begin
          x3_data = W_x3'(stim(ph, W_x3, 0));
          x3_n++;
        end else idle_cycles++;
        x2_valid = ($urandom_range(0, 3) != 0);
        if (x2_valid) begin
          x2_data = W_x2'(stim(ph, W_x2, 1));
          x2_n++;
        end else idle_cycles++;
      end
    @(negedge clk);
    x3_valid = 1'b0;
    x2_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_cor1 != x3_n / 512) begin
      failures++;
      $display("FAIL cor1: %0d outputs for %0d inputs", n_cor1, x3_n);
    end
    checks++;
    if (n_cor1k2 != x2_n / 32) begin
      failures++;
      $display("FAIL cor1k2: %0d outputs for %0d inputs", n_cor1k2, x2_n);
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
