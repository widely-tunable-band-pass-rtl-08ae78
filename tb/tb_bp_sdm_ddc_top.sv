// tb_bp_sdm_ddc_top: self-checking testbench for bp_sdm_ddc_top.
//
// End-to-end test of the whole design at its default parameters: the fs/4
// down-converter with the two M = 512 corrected-1 decimators and the M = 144
// decimator bank, driven at the same time. A fifth stimulus phase drives both
// inputs from behavioural sigma-delta modulators and checks the decimated
// signals against the modulator input tones.
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
module tb_bp_sdm_ddc_top;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 16384;
  localparam int NPHASE = 5;
  localparam int W_bp = 2;
  logic bp_valid = 1'b0;
  logic signed [W_bp-1:0] bp_data = '0;
  int bp_n = 0;
  localparam int W_lp = 2;
  logic lp_valid = 1'b0;
  logic signed [W_lp-1:0] lp_data = '0;
  int lp_n = 0;

  // ---- fs/4 oscillator sequences of the down-converter
  function automatic longint mix_i(longint x, int n);
    case (n % 4)
      0: return x;
      2: return -x;
      default: return 0;
    endcase
  endfunction
  function automatic longint mix_q(longint x, int n);
    case (n % 4)
      1: return -x;
      3: return x;
      default: return 0;
    endcase
  endfunction

  // ---- behavioural sigma-delta modulators driving the last stimulus phase.
  // lp: second-order one-bit low-pass modulator (two delaying integrators,
  // gains 1/2), input 0.5 sin(2 pi k / 2880) (20 output samples per period
  // at M = 144). bp: the same loop with z^-1 replaced by -z^-2, which moves
  // the noise-transfer zeros to fs/4; input 0.5 cos(pi k/2 + 2 pi k/8192),
  // a tone fs/8192 above the notch.
  localparam real PI = 3.14159265358979;
  real lp_y1 = 0.0, lp_y2 = 0.0;
  real bp_a[2] = '{0.0, 0.0};
  real bp_b[2] = '{0.0, 0.0};
  real lp_u[$];
  int  lp_start = -1, bp_start = -1;
  int  tone_lp = 0, tone_bp = 0;
  function automatic longint model_sample(int sid);
    real u, v, n1, n2;
    if (sid == 0) begin
      if (bp_start < 0) bp_start = bp_n;
      u = 0.5 * $cos(PI * bp_n / 2.0 + 2.0 * PI * bp_n / 8192.0);
      v = (bp_b[0] >= 0.0) ? 1.0 : -1.0;
      n1 = -bp_a[0] - 0.5 * (u - v);
      n2 = -bp_b[0] - 0.5 * (bp_a[0] - v);
      bp_a[0] = bp_a[1]; bp_a[1] = n1;
      bp_b[0] = bp_b[1]; bp_b[1] = n2;
    end else begin
      if (lp_start < 0) lp_start = lp_n;
      while (lp_u.size() < lp_n) lp_u.push_back(0.0);
      u = 0.5 * $sin(2.0 * PI * lp_n / 2880.0);
      lp_u.push_back(u);
      v = (lp_y2 >= 0.0) ? 1.0 : -1.0;
      lp_y2 = lp_y2 + 0.5 * (lp_y1 - v);
      lp_y1 = lp_y1 + 0.5 * (u - v);
    end
    return (v > 0.0) ? 1 : -1;
  endfunction

  function automatic real hsum(dec_ref r);
    real s = 0.0;
    foreach (r.h[j]) s += real'(r.h[j]);
    return s;
  endfunction

  // ---- signal checks on the modulator phase: the decimated low-pass outputs
  // must reproduce the sine (after removing the filter gain and its linear-
  // phase delay); the I/Q magnitude must equal half the band-pass tone
  // amplitude.
  always @(posedge clk) if (rst_n && lp_start >= 0 && dir1_valid) begin : tone_dir1
    int li, d;
    real y;
    li = r_dir1.last_index(n_dir1);
    d  = (r_dir1.h.size() - 1) / 2;
    if (li - r_dir1.h.size() > lp_start) begin
      y = real'(dir1_data) / hsum(r_dir1);
      checks++;
      tone_lp++;
      if ((y - lp_u[li-d]) > 0.03 || (lp_u[li-d] - y) > 0.03) begin
        failures++;
        $display("FAIL dir1 tone: %f, expected about %f", y, lp_u[li-d]);
      end
    end
  end
  always @(posedge clk) if (rst_n && lp_start >= 0 && cor2_valid) begin : tone_cor2
    int li, d;
    real y;
    li = r_cor2.last_index(n_cor2);
    d  = (r_cor2.h.size() - 1) / 2;
    if (li - r_cor2.h.size() > lp_start) begin
      y = real'(cor2_data) / hsum(r_cor2);
      checks++;
      tone_lp++;
      if ((y - lp_u[li-d]) > 0.03 || (lp_u[li-d] - y) > 0.03) begin
        failures++;
        $display("FAIL cor2 tone: %f, expected about %f", y, lp_u[li-d]);
      end
    end
  end
  always @(posedge clk) if (rst_n && bp_start >= 0 && i_valid) begin : tone_iq
    int li;
    real yi, yq, a;
    li = r_i.last_index(n_i);
    if (li - r_i.h.size() > bp_start) begin
      yi = real'(i_data) / hsum(r_i);
      yq = real'(q_data) / hsum(r_i);
      a  = $sqrt(yi * yi + yq * yq);
      checks++;
      tone_bp++;
      if (a > 0.28 || a < 0.22) begin
        failures++;
        $display("FAIL I/Q tone magnitude %f, expected about 0.25", a);
      end
    end
  end
  logic i_valid;
  logic signed [36-1:0] i_data;
  dec_ref r_i;
  int n_i = 0;
  int ext_i = 0;
  longint fs_i;
  logic q_valid;
  logic signed [36-1:0] q_data;
  dec_ref r_q;
  int n_q = 0;
  int ext_q = 0;
  longint fs_q;
  logic dir1_valid;
  logic signed [24-1:0] dir1_data;
  dec_ref r_dir1;
  int n_dir1 = 0;
  int ext_dir1 = 0;
  longint fs_dir1;
  logic dir2_valid;
  logic signed [24-1:0] dir2_data;
  dec_ref r_dir2;
  int n_dir2 = 0;
  int ext_dir2 = 0;
  longint fs_dir2;
  logic dir3_valid;
  logic signed [24-1:0] dir3_data;
  dec_ref r_dir3;
  int n_dir3 = 0;
  int ext_dir3 = 0;
  longint fs_dir3;
  logic mod1_valid;
  logic signed [25-1:0] mod1_data;
  dec_ref r_mod1;
  int n_mod1 = 0;
  int ext_mod1 = 0;
  longint fs_mod1;
  logic mod3_valid;
  logic signed [26-1:0] mod3_data;
  dec_ref r_mod3;
  int n_mod3 = 0;
  int ext_mod3 = 0;
  longint fs_mod3;
  logic pp4_valid;
  logic signed [24-1:0] pp4_data;
  dec_ref r_pp4;
  int n_pp4 = 0;
  int ext_pp4 = 0;
  longint fs_pp4;
  logic cor2_valid;
  logic signed [42-1:0] cor2_data;
  dec_ref r_cor2;
  int n_cor2 = 0;
  int ext_cor2 = 0;
  longint fs_cor2;

  bp_sdm_ddc_top u_dut (
    .clk, .rst_n,
    .bp_valid, .bp_code(bp_data), .i_valid, .i_data, .q_valid, .q_data,
    .lp_valid, .lp_code(lp_data),
    .dir1_valid, .dir1_data, .dir2_valid, .dir2_data, .dir3_valid, .dir3_data,
    .mod1_valid, .mod1_data, .mod3_valid, .mod3_data, .pp4_valid, .pp4_data,
    .cor2_valid, .cor2_data
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && bp_valid) r_i.push(mix_i(longint'(bp_data), r_i.x.size()), cyc);
  always @(posedge clk) if (rst_n && bp_valid) r_q.push(mix_q(longint'(bp_data), r_q.x.size()), cyc);
  always @(posedge clk) if (rst_n && lp_valid) r_dir1.push(longint'(lp_data), cyc);
  always @(posedge clk) if (rst_n && lp_valid) r_dir2.push(longint'(lp_data), cyc);
  always @(posedge clk) if (rst_n && lp_valid) r_dir3.push(longint'(lp_data), cyc);
  always @(posedge clk) if (rst_n && lp_valid) r_mod1.push(longint'(lp_data), cyc);
  always @(posedge clk) if (rst_n && lp_valid) r_mod3.push(longint'(lp_data), cyc);
  always @(posedge clk) if (rst_n && lp_valid) r_pp4.push(longint'(lp_data), cyc);
  always @(posedge clk) if (rst_n && lp_valid) r_cor2.push(longint'(lp_data), cyc);

  always @(posedge clk) if (rst_n && i_valid) begin : mon_i
    int li;
    longint e;
    li = r_i.last_index(n_i);
    checks++;
    if (li >= r_i.x.size()) begin
      failures++;
      $display("FAIL i: output %0d before its input %0d", n_i, li);
    end else begin
      e = r_i.expected(n_i);
      if (longint'(i_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL i: output %0d = %0d, expected %0d", n_i, i_data, e);
      end
      checks++;
      if (cyc - r_i.t[li] != 5) begin
        failures++;
        if (failures < 10) $display("FAIL i: latency %0d cycles, expected 5", cyc - r_i.t[li]);
      end
      if (longint'(i_data) == fs_i) ext_i++;
    end
    n_i++;
  end

  always @(posedge clk) if (rst_n && q_valid) begin : mon_q
    int li;
    longint e;
    li = r_q.last_index(n_q);
    checks++;
    if (li >= r_q.x.size()) begin
      failures++;
      $display("FAIL q: output %0d before its input %0d", n_q, li);
    end else begin
      e = r_q.expected(n_q);
      if (longint'(q_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL q: output %0d = %0d, expected %0d", n_q, q_data, e);
      end
      checks++;
      if (cyc - r_q.t[li] != 5) begin
        failures++;
        if (failures < 10) $display("FAIL q: latency %0d cycles, expected 5", cyc - r_q.t[li]);
      end
      if (longint'(q_data) == fs_q) ext_q++;
    end
    n_q++;
  end

  always @(posedge clk) if (rst_n && dir1_valid) begin : mon_dir1
    int li;
    longint e;
    li = r_dir1.last_index(n_dir1);
    checks++;
    if (li >= r_dir1.x.size()) begin
      failures++;
      $display("FAIL dir1: output %0d before its input %0d", n_dir1, li);
    end else begin
      e = r_dir1.expected(n_dir1);
      if (longint'(dir1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL dir1: output %0d = %0d, expected %0d", n_dir1, dir1_data, e);
      end
      checks++;
      if (cyc - r_dir1.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL dir1: latency %0d cycles, expected 3", cyc - r_dir1.t[li]);
      end
      if (longint'(dir1_data) == fs_dir1) ext_dir1++;
    end
    n_dir1++;
  end

  always @(posedge clk) if (rst_n && dir2_valid) begin : mon_dir2
    int li;
    longint e;
    li = r_dir2.last_index(n_dir2);
    checks++;
    if (li >= r_dir2.x.size()) begin
      failures++;
      $display("FAIL dir2: output %0d before its input %0d", n_dir2, li);
    end else begin
      e = r_dir2.expected(n_dir2);
      if (longint'(dir2_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL dir2: output %0d = %0d, expected %0d", n_dir2, dir2_data, e);
      end
      checks++;
      if (cyc - r_dir2.t[li] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL dir2: latency %0d cycles, expected 2", cyc - r_dir2.t[li]);
      end
      if (longint'(dir2_data) == fs_dir2) ext_dir2++;
    end
    n_dir2++;
  end

  always @(posedge clk) if (rst_n && dir3_valid) begin : mon_dir3
    int li;
    longint e;
    li = r_dir3.last_index(n_dir3);
    checks++;
    if (li >= r_dir3.x.size()) begin
      failures++;
      $display("FAIL dir3: output %0d before its input %0d", n_dir3, li);
    end else begin
      e = r_dir3.expected(n_dir3);
      if (longint'(dir3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL dir3: output %0d = %0d, expected %0d", n_dir3, dir3_data, e);
      end
      checks++;
      if (cyc - r_dir3.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL dir3: latency %0d cycles, expected 3", cyc - r_dir3.t[li]);
      end
      if (longint'(dir3_data) == fs_dir3) ext_dir3++;
    end
    n_dir3++;
  end

  always @(posedge clk) if (rst_n && mod1_valid) begin : mon_mod1
    int li;
    longint e;
    li = r_mod1.last_index(n_mod1);
    checks++;
    if (li >= r_mod1.x.size()) begin
      failures++;
      $display("FAIL mod1: output %0d before its input %0d", n_mod1, li);
    end else begin
      e = r_mod1.expected(n_mod1);
      if (longint'(mod1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL mod1: output %0d = %0d, expected %0d", n_mod1, mod1_data, e);
      end
      checks++;
      if (cyc - r_mod1.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL mod1: latency %0d cycles, expected 3", cyc - r_mod1.t[li]);
      end
      if (longint'(mod1_data) == fs_mod1) ext_mod1++;
    end
    n_mod1++;
  end

  always @(posedge clk) if (rst_n && mod3_valid) begin : mon_mod3
    int li;
    longint e;
    li = r_mod3.last_index(n_mod3);
    checks++;
    if (li >= r_mod3.x.size()) begin
      failures++;
      $display("FAIL mod3: output %0d before its input %0d", n_mod3, li);
    end else begin
      e = r_mod3.expected(n_mod3);
      if (longint'(mod3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL mod3: output %0d = %0d, expected %0d", n_mod3, mod3_data, e);
      end
      checks++;
      if (cyc - r_mod3.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL mod3: latency %0d cycles, expected 3", cyc - r_mod3.t[li]);
      end
      if (longint'(mod3_data) == fs_mod3) ext_mod3++;
    end
    n_mod3++;
  end

  always @(posedge clk) if (rst_n && pp4_valid) begin : mon_pp4
    int li;
    longint e;
    li = r_pp4.last_index(n_pp4);
    checks++;
    if (li >= r_pp4.x.size()) begin
      failures++;
      $display("FAIL pp4: output %0d before its input %0d", n_pp4, li);
    end else begin
      e = r_pp4.expected(n_pp4);
      if (longint'(pp4_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL pp4: output %0d = %0d, expected %0d", n_pp4, pp4_data, e);
      end
      checks++;
      if (cyc - r_pp4.t[li] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL pp4: latency %0d cycles, expected 2", cyc - r_pp4.t[li]);
      end
      if (longint'(pp4_data) == fs_pp4) ext_pp4++;
    end
    n_pp4++;
  end

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
    r_i = new(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(128), 3), 4)), upsample(ck(3), 256)), 512);
    begin
      automatic longint sh = 0;
      foreach (r_i.h[j]) sh += r_i.h[j];
      fs_i = -(longint'(1) <<< (W_bp - 1)) * sh;
    end
    r_q = new(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(128), 3), 4)), upsample(ck(3), 256)), 512);
    begin
      automatic longint sh = 0;
      foreach (r_q.h[j]) sh += r_q.h[j];
      fs_q = -(longint'(1) <<< (W_bp - 1)) * sh;
    end
    r_dir1 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(36), 3), 4)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_dir1.h[j]) sh += r_dir1.h[j];
      fs_dir1 = -(longint'(1) <<< (W_lp - 1)) * sh;
    end
    r_dir2 = new(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(72), 3), 2)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_dir2.h[j]) sh += r_dir2.h[j];
      fs_dir2 = -(longint'(1) <<< (W_lp - 1)) * sh;
    end
    r_dir3 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(3), 3), 2)), upsample(ppow(box(24), 3), 6)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_dir3.h[j]) sh += r_dir3.h[j];
      fs_dir3 = -(longint'(1) <<< (W_lp - 1)) * sh;
    end
    r_mod1 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(36), 3), 2)), upsample(ppow(box(2), 4), 72)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_mod1.h[j]) sh += r_mod1.h[j];
      fs_mod1 = -(longint'(1) <<< (W_lp - 1)) * sh;
    end
    r_mod3 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(24), 3), 2)), upsample(ppow(box(3), 4), 48)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_mod3.h[j]) sh += r_mod3.h[j];
      fs_mod3 = -(longint'(1) <<< (W_lp - 1)) * sh;
    end
    r_pp4 = new(pmul(pmul('{1}, upsample(ppow(box(3), 3), 1)), upsample(ppow(box(48), 3), 3)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_pp4.h[j]) sh += r_pp4.h[j];
      fs_pp4 = -(longint'(1) <<< (W_lp - 1)) * sh;
    end
    r_cor2 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(36), 3), 2)), upsample(pmul(ck(1), psub(pscale_delay(pmul(ck(1), box(2)), 128, 3), pmul(pmul(ck(1), box(2)), pmul(ck(1), box(2))))), 72)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_cor2.h[j]) sh += r_cor2.h[j];
      fs_cor2 = -(longint'(1) <<< (W_lp - 1)) * sh;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < NPHASE; ph++)
      for (int i = 0; i < RUN; i++) begin
        @(negedge clk);
        bp_valid = ($urandom_range(0, 3) != 0);
        if (bp_valid) begin
          bp_data = W_bp'(stim(ph, W_bp, 0));
          bp_n++;
        end else idle_cycles++;
        lp_valid = ($urandom_range(0, 3) != 0);
        if (lp_valid) begin
          lp_data = W_lp'(stim(ph, W_lp, 1));
          lp_n++;
        end else idle_cycles++;
      end
    @(negedge clk);
    bp_valid = 1'b0;
    lp_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_i != bp_n / 512) begin
      failures++;
      $display("FAIL i: %0d outputs for %0d inputs", n_i, bp_n);
    end
    checks++;
    if (n_q != bp_n / 512) begin
      failures++;
      $display("FAIL q: %0d outputs for %0d inputs", n_q, bp_n);
    end
    checks++;
    if (n_dir1 != lp_n / 144) begin
      failures++;
      $display("FAIL dir1: %0d outputs for %0d inputs", n_dir1, lp_n);
    end
    checks++;
    if (ext_dir1 == 0) begin
      failures++;
      $display("FAIL dir1: full-scale output never reached");
    end
    checks++;
    if (n_dir2 != lp_n / 144) begin
      failures++;
      $display("FAIL dir2: %0d outputs for %0d inputs", n_dir2, lp_n);
    end
    checks++;
    if (ext_dir2 == 0) begin
      failures++;
      $display("FAIL dir2: full-scale output never reached");
    end
    checks++;
    if (n_dir3 != lp_n / 144) begin
      failures++;
      $display("FAIL dir3: %0d outputs for %0d inputs", n_dir3, lp_n);
    end
    checks++;
    if (ext_dir3 == 0) begin
      failures++;
      $display("FAIL dir3: full-scale output never reached");
    end
    checks++;
    if (n_mod1 != lp_n / 144) begin
      failures++;
      $display("FAIL mod1: %0d outputs for %0d inputs", n_mod1, lp_n);
    end
    checks++;
    if (ext_mod1 == 0) begin
      failures++;
      $display("FAIL mod1: full-scale output never reached");
    end
    checks++;
    if (n_mod3 != lp_n / 144) begin
      failures++;
      $display("FAIL mod3: %0d outputs for %0d inputs", n_mod3, lp_n);
    end
    checks++;
    if (ext_mod3 == 0) begin
      failures++;
      $display("FAIL mod3: full-scale output never reached");
    end
    checks++;
    if (n_pp4 != lp_n / 144) begin
      failures++;
      $display("FAIL pp4: %0d outputs for %0d inputs", n_pp4, lp_n);
    end
    checks++;
    if (ext_pp4 == 0) begin
      failures++;
      $display("FAIL pp4: full-scale output never reached");
    end
    checks++;
    if (n_cor2 != lp_n / 144) begin
      failures++;
      $display("FAIL cor2: %0d outputs for %0d inputs", n_cor2, lp_n);
    end
    checks++;
    if (idle_cycles == 0) failures++;
    checks++;
    if (tone_lp == 0 || tone_bp == 0) begin
      failures++;
      $display("FAIL modulator tone checks did not run (%0d, %0d)", tone_lp, tone_bp);
    end
    $display("mechanisms: idle cycles %0d, I/Q outputs %0d, M=144 outputs %0d/%0d/%0d/%0d/%0d/%0d/%0d, full-scale outputs %0d/%0d/%0d/%0d/%0d/%0d, tone checks %0d/%0d",
             idle_cycles, n_i, n_dir1, n_dir2, n_dir3, n_mod1, n_mod3, n_pp4, n_cor2,
             ext_dir1, ext_dir2, ext_dir3, ext_mod1, ext_mod3, ext_pp4, tone_lp, tone_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
