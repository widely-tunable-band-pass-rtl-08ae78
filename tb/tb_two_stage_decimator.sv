// tb_two_stage_decimator: self-checking testbench for two_stage_decimator.
//
// Covers the default proposed structure (M1=4, M2=128, K=3, M=512), Direct-3 (2*3*24), Polyphase-4 (3*48),
// Polyphase-1 (4*9), Polyphase-2 (2*72), Polyphase-3 (2*3*24), Modified-Direct-3 (2*24*3, K1=1), the
// modified power-of-two structure with K1=2 cosine sections (4*64*2),
// Modified-Polyphase-1 (2*18*2, K1=1) and Modified-Polyphase-3 (2*8*3, K1=1), NR-CIC-2 for
// M = 3^6 = 729 (polyphase 9, CIC 81) and M = 1024 with M1 = 8, M2 = 128.
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
module tb_two_stage_decimator;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  longint cyc = 0;
  int checks = 0;
  int failures = 0;
  int idle_cycles = 0;
  localparam int RUN = 6144;
  localparam int NPHASE = 4;
  localparam int W_x2 = 2;
  logic x2_valid = 1'b0;
  logic signed [W_x2-1:0] x2_data = '0;
  int x2_n = 0;
  function automatic longint model_sample(int sid);
    return 0;
  endfunction
  logic prop512_valid;
  logic signed [2+2*3+21-1:0] prop512_data;
  dec_ref r_prop512;
  int n_prop512 = 0;
  int ext_prop512 = 0;
  longint fs_prop512;
  logic dir3_valid;
  logic signed [24-1:0] dir3_data;
  dec_ref r_dir3;
  int n_dir3 = 0;
  int ext_dir3 = 0;
  longint fs_dir3;
  logic pp4_valid;
  logic signed [24-1:0] pp4_data;
  dec_ref r_pp4;
  int n_pp4 = 0;
  int ext_pp4 = 0;
  longint fs_pp4;
  logic pp1_valid;
  logic signed [18-1:0] pp1_data;
  dec_ref r_pp1;
  int n_pp1 = 0;
  int ext_pp1 = 0;
  longint fs_pp1;
  logic pp2_valid;
  logic signed [24-1:0] pp2_data;
  dec_ref r_pp2;
  int n_pp2 = 0;
  int ext_pp2 = 0;
  longint fs_pp2;
  logic pp3_valid;
  logic signed [24-1:0] pp3_data;
  dec_ref r_pp3;
  int n_pp3 = 0;
  int ext_pp3 = 0;
  longint fs_pp3;
  logic moddir3_valid;
  logic signed [26-1:0] moddir3_data;
  dec_ref r_moddir3;
  int n_moddir3 = 0;
  int ext_moddir3 = 0;
  longint fs_moddir3;
  logic mod512_valid;
  logic signed [31-1:0] mod512_data;
  dec_ref r_mod512;
  int n_mod512 = 0;
  int ext_mod512 = 0;
  longint fs_mod512;
  logic modpp1_valid;
  logic signed [22-1:0] modpp1_data;
  dec_ref r_modpp1;
  int n_modpp1 = 0;
  int ext_modpp1 = 0;
  longint fs_modpp1;
  logic modpp3_valid;
  logic signed [21-1:0] modpp3_data;
  dec_ref r_modpp3;
  int n_modpp3 = 0;
  int ext_modpp3 = 0;
  longint fs_modpp3;
  logic nrcic2_valid;
  logic signed [32-1:0] nrcic2_data;
  dec_ref r_nrcic2;
  int n_nrcic2 = 0;
  int ext_nrcic2 = 0;
  longint fs_nrcic2;
  logic m1024_valid;
  logic signed [32-1:0] m1024_data;
  dec_ref r_m1024;
  int n_m1024 = 0;
  int ext_m1024 = 0;
  longint fs_m1024;

  two_stage_decimator u_prop512 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(prop512_valid), .out_data(prop512_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(1), .N_DEC3(1), .M2(24)) u_dir3 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(dir3_valid), .out_data(dir3_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(0), .N_DEC3(1), .POLYPHASE(1'b1), .M2(48)) u_pp4 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(pp4_valid), .out_data(pp4_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(2), .POLYPHASE(1'b1), .M2(9)) u_pp1 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(pp1_valid), .out_data(pp1_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(1), .POLYPHASE(1'b1), .M2(72)) u_pp2 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(pp2_valid), .out_data(pp2_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(1), .N_DEC3(1), .POLYPHASE(1'b1), .M2(24)) u_pp3 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(pp3_valid), .out_data(pp3_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(1), .M2(24), .FINAL_N(3), .K_FINAL(4)) u_moddir3 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(moddir3_valid), .out_data(moddir3_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(2), .M2(64), .FINAL_N(2), .K_FINAL(5)) u_mod512 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(mod512_valid), .out_data(mod512_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(1), .POLYPHASE(1'b1), .M2(18), .FINAL_N(2), .K_FINAL(4), .FINAL_POLYPHASE(1'b1)) u_modpp1 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(modpp1_valid), .out_data(modpp1_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(1), .POLYPHASE(1'b1), .M2(8), .FINAL_N(3), .K_FINAL(4), .FINAL_POLYPHASE(1'b1)) u_modpp3 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(modpp3_valid), .out_data(modpp3_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(0), .N_DEC3(2), .POLYPHASE(1'b1), .M2(81)) u_nrcic2 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(nrcic2_valid), .out_data(nrcic2_data)
  );

  two_stage_decimator #(.K(3), .WIN(2), .N_DEC2(3), .M2(128)) u_m1024 (
    .clk, .rst_n, .in_valid(x2_valid), .in_data(x2_data),
    .out_valid(m1024_valid), .out_data(m1024_data)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && x2_valid) r_prop512.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_dir3.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_pp4.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_pp1.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_pp2.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_pp3.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_moddir3.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_mod512.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_modpp1.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_modpp3.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_nrcic2.push(longint'(x2_data), cyc);
  always @(posedge clk) if (rst_n && x2_valid) r_m1024.push(longint'(x2_data), cyc);

  always @(posedge clk) if (rst_n && prop512_valid) begin : mon_prop512
    int li;
    longint e;
    li = r_prop512.last_index(n_prop512);
    checks++;
    if (li >= r_prop512.x.size()) begin
      failures++;
      $display("FAIL prop512: output %0d before its input %0d", n_prop512, li);
    end else begin
      e = r_prop512.expected(n_prop512);
      if (longint'(prop512_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL prop512: output %0d = %0d, expected %0d", n_prop512, prop512_data, e);
      end
      checks++;
      if (cyc - r_prop512.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL prop512: latency %0d cycles, expected 3", cyc - r_prop512.t[li]);
      end
      if (longint'(prop512_data) == fs_prop512) ext_prop512++;
    end
    n_prop512++;
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

  always @(posedge clk) if (rst_n && pp1_valid) begin : mon_pp1
    int li;
    longint e;
    li = r_pp1.last_index(n_pp1);
    checks++;
    if (li >= r_pp1.x.size()) begin
      failures++;
      $display("FAIL pp1: output %0d before its input %0d", n_pp1, li);
    end else begin
      e = r_pp1.expected(n_pp1);
      if (longint'(pp1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL pp1: output %0d = %0d, expected %0d", n_pp1, pp1_data, e);
      end
      checks++;
      if (cyc - r_pp1.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL pp1: latency %0d cycles, expected 3", cyc - r_pp1.t[li]);
      end
      if (longint'(pp1_data) == fs_pp1) ext_pp1++;
    end
    n_pp1++;
  end

  always @(posedge clk) if (rst_n && pp2_valid) begin : mon_pp2
    int li;
    longint e;
    li = r_pp2.last_index(n_pp2);
    checks++;
    if (li >= r_pp2.x.size()) begin
      failures++;
      $display("FAIL pp2: output %0d before its input %0d", n_pp2, li);
    end else begin
      e = r_pp2.expected(n_pp2);
      if (longint'(pp2_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL pp2: output %0d = %0d, expected %0d", n_pp2, pp2_data, e);
      end
      checks++;
      if (cyc - r_pp2.t[li] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL pp2: latency %0d cycles, expected 2", cyc - r_pp2.t[li]);
      end
      if (longint'(pp2_data) == fs_pp2) ext_pp2++;
    end
    n_pp2++;
  end

  always @(posedge clk) if (rst_n && pp3_valid) begin : mon_pp3
    int li;
    longint e;
    li = r_pp3.last_index(n_pp3);
    checks++;
    if (li >= r_pp3.x.size()) begin
      failures++;
      $display("FAIL pp3: output %0d before its input %0d", n_pp3, li);
    end else begin
      e = r_pp3.expected(n_pp3);
      if (longint'(pp3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL pp3: output %0d = %0d, expected %0d", n_pp3, pp3_data, e);
      end
      checks++;
      if (cyc - r_pp3.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL pp3: latency %0d cycles, expected 3", cyc - r_pp3.t[li]);
      end
      if (longint'(pp3_data) == fs_pp3) ext_pp3++;
    end
    n_pp3++;
  end

  always @(posedge clk) if (rst_n && moddir3_valid) begin : mon_moddir3
    int li;
    longint e;
    li = r_moddir3.last_index(n_moddir3);
    checks++;
    if (li >= r_moddir3.x.size()) begin
      failures++;
      $display("FAIL moddir3: output %0d before its input %0d", n_moddir3, li);
    end else begin
      e = r_moddir3.expected(n_moddir3);
      if (longint'(moddir3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL moddir3: output %0d = %0d, expected %0d", n_moddir3, moddir3_data, e);
      end
      checks++;
      if (cyc - r_moddir3.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL moddir3: latency %0d cycles, expected 3", cyc - r_moddir3.t[li]);
      end
      if (longint'(moddir3_data) == fs_moddir3) ext_moddir3++;
    end
    n_moddir3++;
  end

  always @(posedge clk) if (rst_n && mod512_valid) begin : mon_mod512
    int li;
    longint e;
    li = r_mod512.last_index(n_mod512);
    checks++;
    if (li >= r_mod512.x.size()) begin
      failures++;
      $display("FAIL mod512: output %0d before its input %0d", n_mod512, li);
    end else begin
      e = r_mod512.expected(n_mod512);
      if (longint'(mod512_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL mod512: output %0d = %0d, expected %0d", n_mod512, mod512_data, e);
      end
      checks++;
      if (cyc - r_mod512.t[li] != 4) begin
        failures++;
        if (failures < 10) $display("FAIL mod512: latency %0d cycles, expected 4", cyc - r_mod512.t[li]);
      end
      if (longint'(mod512_data) == fs_mod512) ext_mod512++;
    end
    n_mod512++;
  end

  always @(posedge clk) if (rst_n && modpp1_valid) begin : mon_modpp1
    int li;
    longint e;
    li = r_modpp1.last_index(n_modpp1);
    checks++;
    if (li >= r_modpp1.x.size()) begin
      failures++;
      $display("FAIL modpp1: output %0d before its input %0d", n_modpp1, li);
    end else begin
      e = r_modpp1.expected(n_modpp1);
      if (longint'(modpp1_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL modpp1: output %0d = %0d, expected %0d", n_modpp1, modpp1_data, e);
      end
      checks++;
      if (cyc - r_modpp1.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL modpp1: latency %0d cycles, expected 3", cyc - r_modpp1.t[li]);
      end
      if (longint'(modpp1_data) == fs_modpp1) ext_modpp1++;
    end
    n_modpp1++;
  end

  always @(posedge clk) if (rst_n && modpp3_valid) begin : mon_modpp3
    int li;
    longint e;
    li = r_modpp3.last_index(n_modpp3);
    checks++;
    if (li >= r_modpp3.x.size()) begin
      failures++;
      $display("FAIL modpp3: output %0d before its input %0d", n_modpp3, li);
    end else begin
      e = r_modpp3.expected(n_modpp3);
      if (longint'(modpp3_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL modpp3: output %0d = %0d, expected %0d", n_modpp3, modpp3_data, e);
      end
      checks++;
      if (cyc - r_modpp3.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL modpp3: latency %0d cycles, expected 3", cyc - r_modpp3.t[li]);
      end
      if (longint'(modpp3_data) == fs_modpp3) ext_modpp3++;
    end
    n_modpp3++;
  end

  always @(posedge clk) if (rst_n && nrcic2_valid) begin : mon_nrcic2
    int li;
    longint e;
    li = r_nrcic2.last_index(n_nrcic2);
    checks++;
    if (li >= r_nrcic2.x.size()) begin
      failures++;
      $display("FAIL nrcic2: output %0d before its input %0d", n_nrcic2, li);
    end else begin
      e = r_nrcic2.expected(n_nrcic2);
      if (longint'(nrcic2_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL nrcic2: output %0d = %0d, expected %0d", n_nrcic2, nrcic2_data, e);
      end
      checks++;
      if (cyc - r_nrcic2.t[li] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL nrcic2: latency %0d cycles, expected 3", cyc - r_nrcic2.t[li]);
      end
      if (longint'(nrcic2_data) == fs_nrcic2) ext_nrcic2++;
    end
    n_nrcic2++;
  end

  always @(posedge clk) if (rst_n && m1024_valid) begin : mon_m1024
    int li;
    longint e;
    li = r_m1024.last_index(n_m1024);
    checks++;
    if (li >= r_m1024.x.size()) begin
      failures++;
      $display("FAIL m1024: output %0d before its input %0d", n_m1024, li);
    end else begin
      e = r_m1024.expected(n_m1024);
      if (longint'(m1024_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL m1024: output %0d = %0d, expected %0d", n_m1024, m1024_data, e);
      end
      checks++;
      if (cyc - r_m1024.t[li] != 4) begin
        failures++;
        if (failures < 10) $display("FAIL m1024: latency %0d cycles, expected 4", cyc - r_m1024.t[li]);
      end
      if (longint'(m1024_data) == fs_m1024) ext_m1024++;
    end
    n_m1024++;
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
    r_prop512 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(128), 3), 4)), 512);
    begin
      automatic longint sh = 0;
      foreach (r_prop512.h[j]) sh += r_prop512.h[j];
      fs_prop512 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_dir3 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(3), 3), 2)), upsample(ppow(box(24), 3), 6)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_dir3.h[j]) sh += r_dir3.h[j];
      fs_dir3 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_pp4 = new(pmul(pmul('{1}, upsample(ppow(box(3), 3), 1)), upsample(ppow(box(48), 3), 3)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_pp4.h[j]) sh += r_pp4.h[j];
      fs_pp4 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_pp1 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(9), 3), 4)), 36);
    begin
      automatic longint sh = 0;
      foreach (r_pp1.h[j]) sh += r_pp1.h[j];
      fs_pp1 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_pp2 = new(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(72), 3), 2)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_pp2.h[j]) sh += r_pp2.h[j];
      fs_pp2 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_pp3 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(3), 3), 2)), upsample(ppow(box(24), 3), 6)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_pp3.h[j]) sh += r_pp3.h[j];
      fs_pp3 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_moddir3 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(24), 3), 2)), upsample(ppow(box(3), 4), 48)), 144);
    begin
      automatic longint sh = 0;
      foreach (r_moddir3.h[j]) sh += r_moddir3.h[j];
      fs_moddir3 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_mod512 = new(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(64), 3), 4)), upsample(ppow(box(2), 5), 256)), 512);
    begin
      automatic longint sh = 0;
      foreach (r_mod512.h[j]) sh += r_mod512.h[j];
      fs_mod512 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_modpp1 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(18), 3), 2)), upsample(ppow(box(2), 4), 36)), 72);
    begin
      automatic longint sh = 0;
      foreach (r_modpp1.h[j]) sh += r_modpp1.h[j];
      fs_modpp1 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_modpp3 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(8), 3), 2)), upsample(ppow(box(3), 4), 16)), 48);
    begin
      automatic longint sh = 0;
      foreach (r_modpp3.h[j]) sh += r_modpp3.h[j];
      fs_modpp3 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_nrcic2 = new(pmul(pmul(pmul('{1}, upsample(ppow(box(3), 3), 1)), upsample(ppow(box(3), 3), 3)), upsample(ppow(box(81), 3), 9)), 729);
    begin
      automatic longint sh = 0;
      foreach (r_nrcic2.h[j]) sh += r_nrcic2.h[j];
      fs_nrcic2 = -(longint'(1) <<< (W_x2 - 1)) * sh;
    end
    r_m1024 = new(pmul(pmul(pmul(pmul('{1}, upsample(ppow(box(2), 3), 1)), upsample(ppow(box(2), 3), 2)), upsample(ppow(box(2), 3), 4)), upsample(ppow(box(128), 3), 8)), 1024);
    begin
      automatic longint sh = 0;
      foreach (r_m1024.h[j]) sh += r_m1024.h[j];
      fs_m1024 = -(longint'(1) <<< (W_x2 - 1)) * sh;
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
    if (n_prop512 != x2_n / 512) begin
      failures++;
      $display("FAIL prop512: %0d outputs for %0d inputs", n_prop512, x2_n);
    end
    checks++;
    if (ext_prop512 == 0) begin
      failures++;
      $display("FAIL prop512: full-scale output never reached");
    end
    checks++;
    if (n_dir3 != x2_n / 144) begin
      failures++;
      $display("FAIL dir3: %0d outputs for %0d inputs", n_dir3, x2_n);
    end
    checks++;
    if (ext_dir3 == 0) begin
      failures++;
      $display("FAIL dir3: full-scale output never reached");
    end
    checks++;
    if (n_pp4 != x2_n / 144) begin
      failures++;
      $display("FAIL pp4: %0d outputs for %0d inputs", n_pp4, x2_n);
    end
    checks++;
    if (ext_pp4 == 0) begin
      failures++;
      $display("FAIL pp4: full-scale output never reached");
    end
    checks++;
    if (n_pp1 != x2_n / 36) begin
      failures++;
      $display("FAIL pp1: %0d outputs for %0d inputs", n_pp1, x2_n);
    end
    checks++;
    if (ext_pp1 == 0) begin
      failures++;
      $display("FAIL pp1: full-scale output never reached");
    end
    checks++;
    if (n_pp2 != x2_n / 144) begin
      failures++;
      $display("FAIL pp2: %0d outputs for %0d inputs", n_pp2, x2_n);
    end
    checks++;
    if (ext_pp2 == 0) begin
      failures++;
      $display("FAIL pp2: full-scale output never reached");
    end
    checks++;
    if (n_pp3 != x2_n / 144) begin
      failures++;
      $display("FAIL pp3: %0d outputs for %0d inputs", n_pp3, x2_n);
    end
    checks++;
    if (ext_pp3 == 0) begin
      failures++;
      $display("FAIL pp3: full-scale output never reached");
    end
    checks++;
    if (n_moddir3 != x2_n / 144) begin
      failures++;
      $display("FAIL moddir3: %0d outputs for %0d inputs", n_moddir3, x2_n);
    end
    checks++;
    if (ext_moddir3 == 0) begin
      failures++;
      $display("FAIL moddir3: full-scale output never reached");
    end
    checks++;
    if (n_mod512 != x2_n / 512) begin
      failures++;
      $display("FAIL mod512: %0d outputs for %0d inputs", n_mod512, x2_n);
    end
    checks++;
    if (ext_mod512 == 0) begin
      failures++;
      $display("FAIL mod512: full-scale output never reached");
    end
    checks++;
    if (n_modpp1 != x2_n / 72) begin
      failures++;
      $display("FAIL modpp1: %0d outputs for %0d inputs", n_modpp1, x2_n);
    end
    checks++;
    if (ext_modpp1 == 0) begin
      failures++;
      $display("FAIL modpp1: full-scale output never reached");
    end
    checks++;
    if (n_modpp3 != x2_n / 48) begin
      failures++;
      $display("FAIL modpp3: %0d outputs for %0d inputs", n_modpp3, x2_n);
    end
    checks++;
    if (ext_modpp3 == 0) begin
      failures++;
      $display("FAIL modpp3: full-scale output never reached");
    end
    checks++;
    if (n_nrcic2 != x2_n / 729) begin
      failures++;
      $display("FAIL nrcic2: %0d outputs for %0d inputs", n_nrcic2, x2_n);
    end
    checks++;
    if (ext_nrcic2 == 0) begin
      failures++;
      $display("FAIL nrcic2: full-scale output never reached");
    end
    checks++;
    if (n_m1024 != x2_n / 1024) begin
      failures++;
      $display("FAIL m1024: %0d outputs for %0d inputs", n_m1024, x2_n);
    end
    checks++;
    if (ext_m1024 == 0) begin
      failures++;
      $display("FAIL m1024: full-scale output never reached");
    end
    checks++;
    if (idle_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
