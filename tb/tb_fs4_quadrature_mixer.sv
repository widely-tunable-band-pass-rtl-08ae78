// tb_fs4_quadrature_mixer: self-checking testbench for fs4_quadrature_mixer.
//
// Drives random codes over the full input range (including the most negative
// code, whose negation needs the extra output bit) with random idle cycles,
// and checks one clock later that I = x cos(pi n/2) and Q = -x sin(pi n/2),
// where n counts accepted samples from reset. Idle cycles must not advance
// the oscillator. A second reset in the middle checks that the oscillator
// phase restarts at 0. A watchdog ends the run with a failure if it hangs.
// The oscillator sequences are those of the published fs/4 down-converter;
// the sign of Q and the test schedule are this testbench's own.
module tb_fs4_quadrature_mixer;

  localparam int WIN = 3;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  in_valid = 1'b0;
  logic signed [WIN-1:0] in_data = '0;
  logic                  out_valid;
  logic signed [WIN:0]   i_data, q_data;

  int checks = 0;
  int failures = 0;
  int n = 0;                 // accepted samples since reset
  int exp_valid = 0;
  longint exp_i, exp_q;
  int seen_phase [4] = '{0, 0, 0, 0};

  fs4_quadrature_mixer #(.WIN(WIN)) u_dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .i_data, .q_data
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit v, input longint x, input bit rst);
    @(negedge clk);
    // check what the previous edge produced
    if (rst_n) begin
      checks++;
      if (out_valid !== (exp_valid != 0)) begin
        failures++;
        $display("FAIL out_valid %0b, expected %0d", out_valid, exp_valid);
      end
      if (exp_valid != 0) begin
        checks++;
        if (longint'(i_data) != exp_i || longint'(q_data) != exp_q) begin
          failures++;
          $display("FAIL sample %0d: I=%0d Q=%0d, expected %0d %0d", n - 1, i_data, q_data, exp_i, exp_q);
        end
      end
    end
    rst_n    = !rst;
    in_valid = v;
    in_data  = WIN'(x);
    exp_valid = (v && !rst) ? 1 : 0;
    if (rst) n = 0;
    else if (v) begin
      case (n % 4)
        0: begin exp_i = x;  exp_q = 0;  end
        1: begin exp_i = 0;  exp_q = -x; end
        2: begin exp_i = -x; exp_q = 0;  end
        default: begin exp_i = 0; exp_q = x; end
      endcase
      seen_phase[n % 4]++;
      n++;
    end
  endtask

  initial begin : main
    repeat (3) step(1'b0, 0, 1'b1);
    for (int k = 0; k < 400; k++)
      step($urandom_range(0, 3) != 0, longint'($urandom_range(0, 7)) - 4, 1'b0);
    step(1'b0, 0, 1'b1);
    for (int k = 0; k < 400; k++)
      step($urandom_range(0, 2) != 0, (k % 2 == 0) ? -4 : 3, 1'b0);
    step(1'b0, 0, 1'b0);
    step(1'b0, 0, 1'b0);
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (seen_phase[p] == 0) begin
        failures++;
        $display("FAIL oscillator phase %0d never used", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
