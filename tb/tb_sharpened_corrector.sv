// tb_sharpened_corrector: self-checking testbench for sharpened_corrector.
//
// Reference: C_1(z) * (128 z^-3 G(z) - G(z)^2) with G = C_1(z)(1 + z^-1), then down-sampling by two.
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
module tb_sharpened_corrector;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 400;
  localparam int NPHASE = 4;
  localparam int W_x19 = 19;
  logic x19_valid = 1'b0;
  logic signed [W_x19-1:0] x19_data = '0;
  int x19_n = 0;
  localparam int W_x4 = 4;
  logic x4_valid = 1'b0;
  logic signed [W_x4-1:0] x4_data = '0;
  int x4_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic sh_valid;
  logic signed [19+6+15-1:0] sh_data;
  dec_ref r_sh;
  int n_sh = 0;
  int ext_sh = 0;
  longint fs_sh;
  logic sh4_valid;
  logic signed [4+6+15-1:0] sh4_data;
  dec_ref r_sh4;
  int n_sh4 = 0;
  int ext_sh4 = 0;
  longint fs_sh4;

  sharpened_corrector u_sh (
    .clk, .rst_n, .in_valid(x19_valid), .in_data(x19_data),
    .out_valid(sh_valid), .out_data(sh_data)
  );

  sharpened_corrector #(.WIN(4)) u_sh4 (
    .clk, .rst_n, .in_valid(x4_valid), .in_data(x4_data),
    .out_valid(sh4_valid), .out_data(sh4_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x19_valid) r_sh.push(longint'(x19_data), cyc);
  always @(posedge clk) if (rst_n && x4_valid) r_sh4.push(longint'(x4_data), cyc);

  always @(posedge clk) if (rst_n && sh_valid) begin : mon_sh
    int li;
    longint e;
    li = r_sh.last_index(n_sh);
    checks++;
    if (li >= r_sh.x.size()) begin
      failures++;
      $display("FAIL sh: output %0d before its input %0d", n_sh, li);
    end else begin
      e = r_sh.expected(n_sh);
      if (longint'(sh_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL sh: output %0d = %0d, expected %0d", n_sh, sh_data, e);
      end
      checks++;
      if (cyc - r_sh.t[li] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL sh: latency %0d cycles, expected 2", cyc - r_sh.t[li]);
      end
      if (longint'(sh_data) == fs_sh) ext_sh++;
    end
    n_sh++;
  end

  always @(posedge clk) if (rst_n && sh4_valid) begin : mon_sh4
    int li;
    longint e;
    li = r_sh4.last_index(n_sh4);
    checks++;
    if (li >= r_sh4.x.size()) begin
      failures++;
      $display("FAIL sh4: output %0d before its input %0d", n_sh4, li);
    end else begin
      e = r_sh4.expected(n_sh4);
      if (longint'(sh4_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL sh4: output %0d = %0d, expected %0d", n_sh4, sh4_data, e);
      end
      checks++;
      if (cyc - r_sh4.t[li] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL sh4: latency %0d cycles, expected 2", cyc - r_sh4.t[li]);
      end
      if (longint'(sh4_data) == fs_sh4) ext_sh4++;
    end
    n_sh4++;
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
    r_sh = new(pmul(ck(1), psub(pscale_delay(pmul(ck(1), box(2)), 128, 3), pmul(pmul(ck(1), box(2)), pmul(ck(1), box(2))))), 2);
    begin
      automatic longint sh = 0;
      foreach (r_sh.h[j]) sh += r_sh.h[j];
      fs_sh = -(longint'(1) <<< (W_x19 - 1)) * sh;
    end
    r_sh4 = new(pmul(ck(1), psub(pscale_delay(pmul(ck(1), box(2)), 128, 3), pmul(pmul(ck(1), box(2)), pmul(ck(1), box(2))))), 2);
    begin
      automatic longint sh = 0;
      foreach (r_sh4.h[j]) sh += r_sh4.h[j];
      fs_sh4 = -(longint'(1) <<< (W_x4 - 1)) * sh;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < NPHASE; ph++)
      for (int i = 0; i < RUN; i++) begin
        @(negedge clk);
        x19_valid = ($urandom_range(0, 3) != 0);
        if (x19_valid) begin
          x19_data = W_x19'(stim(ph, W_x19, 0));
          x19_n++;
        end else idle_cycles++;
        x4_valid = ($urandom_range(0, 3) != 0);
        if (x4_valid) begin
          x4_data = W_x4'(stim(ph, W_x4, 1));
          x4_n++;
        end else idle_cycles++;
      end
    @(negedge clk);
    x19_valid = 1'b0;
    x4_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_sh != x19_n / 2) begin
      failures++;
      $display("FAIL sh: %0d outputs for %0d inputs", n_sh, x19_n);
    end
    checks++;
    if (n_sh4 != x4_n / 2) begin
      failures++;
      $display("FAIL sh4: %0d outputs for %0d inputs", n_sh4, x4_n);
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
