// tb_large_decimation: self-checking testbench for two_stage_decimator.
//
// Workload test for the largest power-of-two decimation factors the structure is
// sized for, M = 4096 = 16 * 256 and M = 8192 = 16 * 512 (M1 = 16), and for
// NR-CIC-1 with a direct-form decimate-by-3 first stage, at M = 243 = 3 * 81
// and at its full size M = 3^10 = 59049 = 3 * 19683 (an impulse response of
// 177,000 taps; this run takes under a minute).
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
module tb_large_decimation;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 330000;
  localparam int NPHASE = 4;
  localparam int W_x2 = 2;
  logic x2_valid = 1'b0;
  logic signed [W_x2-1:0] x2_data = '0;
  int x2_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic m4096_valid;
  logic signed [38-1:0] m4096_data;
  dec_ref r_m4096;
  int n_m4096 = 0;
  int ext_m4096 = 0;
  longint fs_m4096;
  logic m8192_valid;
  logic signed [41-1:0] m8192_data;
  dec_ref r_m8192;
  int n_m8192 = 0;
  int ext_m8192 = 0;
  longint fs_m8192;
  logic nrcic1_valid;
  logic signed [27-1:0] nrcic1_data;
  dec_ref r_nrcic1;
  int n_nrcic1 = 0;
  int ext_nrcic1 = 0;
  longint fs_nrcic1;
  logic nrcic1b_valid;
  logic signed [50-1:0] nrcic1b_data;
  dec_ref r_nrcic1b;
  int n_nrcic1b = 0;
  int ext_nrcic1b = 0;
  longint fs_nrcic1b;

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(4), .M2(256)) u_m4096 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(m4096_valid), .out_data(m4096_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(4), .M2(512)) u_m8192 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(m8192_valid), .out_data(m8192_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(0), .N_DEC3(1), .M2(81)) u_nrcic1 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(nrcic1_valid), .out_data(nrcic1_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(0), .N_DEC3(1), .M2(19683)) u_nrcic1b (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(nrcic1b_valid), .out_data(nrcic1b_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x2_valid) r_m4096.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_m8192.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_nrcic1.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_nrcic1b.push(longint'(x2_data), cyc);

  always @(posedge clk) if (rst_n && m4096_valid) begin : mon_m4096
    int li;
    longint e;
    li = r_m4096.last_index(n_m4096);
    checks++;
    if (li >= r_m4096.x.size()) begin
      failures++;
      $display("FAIL m4096: output %0d before its input %0d", n_m4096, li);
    end else begin
      e = r_m4096.expected(n_m4096);
      if (longint'(m4096_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL m4096: output %0d = %0d, expected %0d", n_m4096, m4096_data, e);
      end
      checks++;
      if (cyc - r_m4096.t[li] != 5) begin
        failures++;
        if (failures < 10) $display("FAIL m4096: latency %0d cycles, expected 5", cyc - r_m4096.t[li]);
      end
      if (longint'(m4096_data) == fs_m4096) ext_m4096++;
    end
    n_m4096++;
  end

  always @(posedge clk) if (rst_n && m8192_valid) begin : mon_m8192
    int li;
    longint e;
    li = r_m8192.last_index(n_m8192);
    checks++;
    if (li >= r_m8192.x.size()) begin
      failures++;
      $display("FAIL m8192: output %0d before its input %0d", n_m8192, li);
    end else begin
      e = r_m8192.expected(n_m8192);
      if (longint'(m8192_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL m8192: output %0d = %0d, expected %0d", n_m8192, m8192_data, e);
      end
      checks++;
      if (cyc - r_m8192.t[li] != 5) begin
        failures++;
        if (failures < 10) $display("FAIL m8192: latency %0d cycles, expected 5", cyc - r_m8192.t[li]);
      end
      if (longint'(m8192_data) == fs_m8192) ext_m8192++;
    end
    n_m8192++;
  end

  always @(posedge clk) if (rst_n && nrcic1_valid) begin : mon_nrcic1
    int li;
    longint e;
    li = r_nrcic1.last_index(n_nrcic1);
    checks++;
    if (li >= r_nrcic1.x.size()) begin
      failures++;
      $display("FAIL nrcic1: output %0d before its input %0d", n_nrcic1, li);
    end else begin
      e = r_nrcic1.expected(n_nrcic1);
      if (longint'(nrcic1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL nrcic1: output %0d = %0d, expected %0d", n_nrcic1, nrcic1_data, e);
      end
      checks++;
      if (cyc - r_nrcic1.t[li] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL nrcic1: latency %0d cycles, expected 2", cyc - r_nrcic1.t[li]);
      end
      if (longint'(nrcic1_data) == fs_nrcic1) ext_nrcic1++;
    end
    n_nrcic1++;
  end

  always @(posedge clk) if (rst_n && nrcic1b_valid) begin : mon_nrcic1b
    int li;
    longint e;
    li = r_nrcic1b.last_index(n_nrcic1b);
    checks++;
    if (li >= r_nrcic1b.x.size()) begin
      failures++;
      $display("FAIL nrcic1b: output %0d before its input %0d", n_nrcic1b, li);
    end else begin
      e = r_nrcic1b.expected(n_nrcic1b);
      if (longint'(nrcic1b_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL nrcic1b: output %0d = %0d, expected %0d", n_nrcic1b, nrcic1b_data, e);
      end
      checks++;
      if (cyc - r_nrcic1b.t[li] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL nrcic1b: latency %0d cycles, expected 2", cyc - r_nrcic1b.t[li]);
      end
      if (longint'(nrcic1b_data) == fs_nrcic1b) ext_nrcic1b++;
    end
    n_nrcic1b++;
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
    r_m4096 = new(pmul(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(2), 3), 4)), upsample(ppow(box(2), 3), 8)), upsample(ppow(box(256), 3), 16)), 4096);
    begin
      automatic longint sh = 0;
      foreach (r_m4096.h[j]) sh += r_m4096.h[j];
      fs_m4096 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_m8192 = new(pmul(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(2), 3), 4)), upsample(ppow(box(2), 3), 8)), upsample(ppow(box(512), 3), 16)), 8192);
    begin
      automatic longint sh = 0;
      foreach (r_m8192.h[j]) sh += r_m8192.h[j];
      fs_m8192 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_nrcic1 = new(pmul(pmul('{1}, upsample(ppow(box(3), 3), 1)), upsample(ppow(box(81), 3), 3)), 243);
    begin
      automatic longint sh = 0;
      foreach (r_nrcic1.h[j]) sh += r_nrcic1.h[j];
      fs_nrcic1 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_nrcic1b = new(pmul(pmul('{1}, upsample(ppow(box(3), 3), 1)), upsample(ppow(box(19683), 3), 3)), 59049);
    begin
      automatic longint sh = 0;
      foreach (r_nrcic1b.h[j]) sh += r_nrcic1b.h[j];
      fs_nrcic1b = -(longint'(1) <<< (W_x2 - 1)) * sh;
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
      end
    @(negedge clk);
    x2_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_m4096 != x2_n / 4096) begin
      failures++;
      $display("FAIL m4096: %0d outputs for %0d inputs", n_m4096, x2_n);
    end
    checks++;
    if (ext_m4096 == 0) begin
      failures++;
      $display("FAIL m4096: full-scale output never reached");
    end
    checks++;
    if (n_m8192 != x2_n / 8192) begin
      failures++;
      $display("FAIL m8192: %0d outputs for %0d inputs", n_m8192, x2_n);
    end
    checks++;
    if (ext_m8192 == 0) begin
      failures++;
      $display("FAIL m8192: full-scale output never reached");
    end
    checks++;
    if (n_nrcic1 != x2_n / 243) begin
      failures++;
      $display("FAIL nrcic1: %0d outputs for %0d inputs", n_nrcic1, x2_n);
    end
    checks++;
    if (ext_nrcic1 == 0) begin
      failures++;
      $display("FAIL nrcic1: full-scale output never reached");
    end
    checks++;
    if (n_nrcic1b != x2_n / 59049) begin
      failures++;
      $display("FAIL nrcic1b: %0d outputs for %0d inputs", n_nrcic1b, x2_n);
    end
    checks++;
    if (ext_nrcic1b == 0) begin
      failures++;
      $display("FAIL nrcic1b: full-scale output never reached");
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
