// tb_sqrt_unit: self-checking test of the square-root unit.
//
// Directed cases (sqrt 16 = 4, sqrt 2, exact and inexact roots, +-0, +inf,
// negative operands, NaNs, subnormal operands with odd and even exponents) and
// random operands in all four rounding modes, compared bit for bit with the
// reference model (an integer square root refined from a real-valued estimate).
// The time from start to ready is checked against the unit's 29-cycle latency.
module tb_sqrt_unit;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int LATENCY = 29;

  logic         clk = 1'b0;
  logic         start = 1'b0;
  logic [31:0]  opa = '0;
  rmode_e       rmode = RM_NEAREST_EVEN;
  logic [31:0]  result;
  unit_status_t status;
  logic         ready;

  int checks = 0, failures = 0;

  sqrt_unit dut (
    .clk_i(clk), .start_i(start), .opa_i(opa), 
    .rmode_i(rmode), .result_o(result), .status_o(status), .ready_o(ready)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] a, input logic [1:0] rm);
    ref_t exp_r;
    int   cycles;
    @(negedge clk);
    opa = a; rmode = rmode_e'(rm); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    opa = $urandom;        // the unit must hold its own copy
    cycles = 1;
    while (!ready && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    exp_r = ref_sqrt(a, rm);
    checks++;
    if (result !== exp_r.result || status.ine !== exp_r.ine || status.overflow !== exp_r.overflow ||
        status.underflow !== exp_r.underflow || status.div_zero !== 1'b0) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s %h rm=%0d: got %h ine=%b ovf=%b unf=%b, want %h ine=%b ovf=%b unf=%b",
                 "sqrt", a, rm, result, status.ine, status.overflow, status.underflow,
                 exp_r.result, exp_r.ine, exp_r.overflow, exp_r.underflow);
    end
    checks++;
    if (cycles != LATENCY) begin
      failures++;
      if (failures < 20) $display("FAIL latency %0d, want %0d", cycles, LATENCY);
    end
  endtask

  initial begin
    logic [31:0] a;
    run(32'h4180_0000, 2'd0);            // sqrt 16 = 4
    checks++; if (result !== 32'h4080_0000) failures++;
    run(32'h4000_0000, 2'd0);            // sqrt 2
    checks++; if (result !== 32'h3FB5_04F3) failures++;
    run(32'h8000_0000, 2'd0);
    run(32'h0000_0000, 2'd0);
    run(32'h7F80_0000, 2'd0);
    run(32'hFF80_0000, 2'd0);
    run(32'hBF80_0000, 2'd0);
    run(32'h7F80_0010, 2'd0);
    for (int m = 0; m < 4; m++) begin
      run(32'h4000_0000, 2'(m));
      run(32'h4040_0000, 2'(m));
      run(32'h0000_0001, 2'(m));
      run(32'h0000_0002, 2'(m));
      run(32'h007F_FFFF, 2'(m));
      run(32'h7F7F_FFFF, 2'(m));
    end
    // random
    for (int i = 0; i < 4000; i++) begin
      int e;
      e = $urandom_range(1, 254);
      a = rand_operand(e);
      if ($urandom_range(0, 3) != 0) a[31] = 1'b0;
      run(a, 2'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
