// tb_corrected2_decimator: self-checking testbench for corrected2_decimator.
//
// Reference: H_P(z) S(z^(M1 M2)) for the default M = 2*36*2, K=3, for
// M = 4*8*2 with K=5 (the last stage is the same for every K) and for M = 128 = 2*32*2.
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
module tb_corrected2_decimator;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 2048;
  localparam int NPHASE = 4;
  localparam int W_x2 = 2;
  logic x2_valid = 1'b0;
  logic signed [W_x2-1:0] x2_data = '0;
  int x2_n = 0;
  localparam int W_x3 = 3;
  logic x3_valid = 1'b0;
  logic signed [W_x3-1:0] x3_data = '0;
  int x3_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic cor2_valid;
  logic signed [42-1:0] cor2_data;
  dec_ref r_cor2;
  int n_cor2 = 0;
  int ext_cor2 = 0;
  longint fs_cor2;
  logic cor2k5_valid;
  logic signed [49-1:0] cor2k5_data;
  dec_ref r_cor2k5;
  int n_cor2k5 = 0;
  int ext_cor2k5 = 0;
  longint fs_cor2k5;
  logic cor2m128_valid;
  logic signed [41-1:0] cor2m128_data;
  dec_ref r_cor2m128;
  int n_cor2m128 = 0;
  int ext_cor2m128 = 0;
  longint fs_cor2m128;

  corrected2_decimator u_cor2 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(cor2_valid), .out_data(cor2_data)
  );

  corrected2_decimator #(.K(5), .WIN(3), .N_DEC2(2), .M2(8)) u_cor2k5 (
    .clk, .rst_n, .in_valid(x3_valid), .in_data(x3_data),
    .out_valid(cor2k5_valid), .out_data(cor2k5_data)
  );

  corrected2_decimator #(.K(3), .WIN(2), .N_DEC2(1), .M2(32)) u_cor2m128 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(cor2m128_valid), .out_data(cor2m128_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x2_valid) r_cor2.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x3_valid) r_cor2k5.push(longint'(x3_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_cor2m128.push(longint'(x2_data), cyc);

  always @(posedge clk) if (rst_n && cor2_valid) begin : mon_cor2
    int li;
    longint e;
    li = r_cor2.last_index(n_cor2);
    checks++;
    if (li >= r_cor2.x.size()) begin
      failures++;
      $display("FAIL cor2: output %0d before its input %0d", n_cor2, li);
    end else begin
      e = r_cor2.expected(n_cor2);
      if (longint'(cor2_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cor2: output %0d = %0d, expected %0d", n_cor2, cor2_data, e);
      end
      checks++;
      if (cyc - r_cor2.t[li] != 4) begin
        failures++;
        if (failures < 10) $display("FAIL cor2: latency %0d cycles, expected 4", cyc - r_cor2.t[li]);
      end
      if (longint'(cor2_data) == fs_cor2) ext_cor2++;
    end
    n_cor2++;
  end

  always @(posedge clk) if (rst_n && cor2k5_valid) begin : mon_cor2k5
    int li;
    longint e;
    li = r_cor2k5.last_index(n_cor2k5);
    checks++;
    if (li >= r_cor2k5.x.size()) begin
      failures++;
      $display("FAIL cor2k5: output %0d before its input %0d", n_cor2k5, li);
    end else begin
      e = r_cor2k5.expected(n_cor2k5);
      if (longint'(cor2k5_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cor2k5: output %0d = %0d, expected %0d", n_cor2k5, cor2k5_data, e);
      end
      checks++;
      if (cyc - r_cor2k5.t[li] != 5) begin
        failures++;
        if (failures < 10) $display("FAIL cor2k5: latency %0d cycles, expected 5", cyc - r_cor2k5.t[li]);
      end
      if (longint'(cor2k5_data) == fs_cor2k5) ext_cor2k5++;
    end
    n_cor2k5++;
  end

  always @(posedge clk) if (rst_n && cor2m128_valid) begin : mon_cor2m128
    int li;
    longint e;
    li = r_cor2m128.last_index(n_cor2m128);
    checks++;
    if (li >= r_cor2m128.x.size()) begin
      failures++;
      $display("FAIL cor2m128: output %0d before its input %0d", n_cor2m128, li);
    end else begin
      e = r_cor2m128.expected(n_cor2m128);
      if (longint'(cor2m128_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cor2m128: output %0d = %0d, expected %0d", n_cor2m128, cor2m128_data, e);
      end
      checks++;
      if (cyc - r_cor2m128.t[li] != 4) begin
        failures++;
        if (failures < 10) $display("FAIL cor2m128: latency %0d cycles, expected 4", cyc - r_cor2m128.t[li]);
      end
      if (longint'(cor2m128_data) == fs_cor2m128) ext_cor2m128++;
    end
    n_cor2m128++;
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
    r_cor2 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(36), 3), 2)), upsample(pmul(ck(1), psub(pscale_delay(pmul(ck(1), box(2)), 128, 3), pmul(pmul(ck(1), box(2)), pmul(ck(1), box(2))))), 72)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_cor2.h[j]) sh += r_cor2.h[j];
      fs_cor2 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_cor2k5 = new(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 5), 1)), upsample(ppow(box(2), 5), 2)), upsample(ppow(box(8), 5), 4)), upsample(pmul(ck(1), psub(pscale_delay(pmul(ck(1), box(2)), 128, 3), pmul(pmul(ck(1), box(2)), pmul(ck(1), box(2))))), 32)), 64);
    begin
      automatic longint sh = 0;
      foreach (r_cor2k5.h[j]) sh += r_cor2k5.h[j];
      fs_cor2k5 = -(longint'(1) <<< (W_x3 - 1)) * sh;
    end
    r_cor2m128 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(32), 3), 2)), upsample(pmul(ck(1), psub(pscale_delay(pmul(ck(1), box(2)), 128, 3), pmul(pmul(ck(1), box(2)), pmul(ck(1), box(2))))), 64)), 128);
    begin
      automatic longint sh = 0;
      foreach (r_cor2m128.h[j]) sh += r_cor2m128.h[j];
      fs_cor2m128 = -(longint'(1) <<< (W_x2 - 1)) * sh;
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
        x3_valid = ($urandom_range(0, 3) != 0);
        if (x3_valid) begin
          x3_data = W_x3'(stim(ph, W_x3, 1));
          x3_n++;
        end else idle_cycles++;
      end
    @(negedge clk);
    x2_valid = 1'b0;
    x3_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_cor2 != x2_n / 144) begin
      failures++;
      $display("FAIL cor2: %0d outputs for %0d inputs", n_cor2, x2_n);
    end
    checks++;
    if (n_cor2k5 != x3_n / 64) begin
      failures++;
      $display("FAIL cor2k5: %0d outputs for %0d inputs", n_cor2k5, x3_n);
    end
    checks++;
    if (n_cor2m128 != x2_n / 128) begin
      failures++;
      $display("FAIL cor2m128: %0d outputs for %0d inputs", n_cor2m128, x2_n);
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
