// tb_mul_unit: self-checking test of the multiplication unit.
//
// Directed cases (4 x 2.5, products that overflow, that fall into the subnormal
// range or to zero, 0 x inf, NaNs) and random operand pairs in all four rounding
// modes, compared bit for bit with the exact-integer reference model. The time from
// start to ready is checked against the unit's seven-cycle latency (one cycle
// pre-normalize, five in the parallel multiplier, one post-normalize).
module tb_mul_unit;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int LATENCY = 7;

  logic         clk = 1'b0;
  logic         start = 1'b0;
  logic [31:0]  opa = '0, opb = '0;
  rmode_e       rmode = RM_NEAREST_EVEN;
  logic [31:0]  result;
  unit_status_t status;
  logic         ready;

  int checks = 0, failures = 0;

  mul_unit dut (
    .clk_i(clk), .start_i(start), .opa_i(opa), .opb_i(opb),
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

  task automatic run(input logic [31:0] a, input logic [31:0] b, input logic [1:0] rm);
    ref_t exp_r;
    int   cycles;
    @(negedge clk);
    opa = a; opb = b; rmode = rmode_e'(rm); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    opa = $urandom; opb = $urandom;        // the unit must hold its own copy
    cycles = 1;
    while (!ready && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    exp_r = ref_mul(a, b, rm);
    checks++;
    if (result !== exp_r.result || status.ine !== exp_r.ine || status.overflow !== exp_r.overflow ||
        status.underflow !== exp_r.underflow || status.div_zero !== 1'b0) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h %s %h rm=%0d: got %h ine=%b ovf=%b unf=%b, want %h ine=%b ovf=%b unf=%b",
                 a, "*", b, rm, result, status.ine, status.overflow, status.underflow,
                 exp_r.result, exp_r.ine, exp_r.overflow, exp_r.underflow);
    end
    checks++;
    if (cycles != LATENCY) begin
      failures++;
      if (failures < 20) $display("FAIL latency %0d, want %0d", cycles, LATENCY);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    run(32'h4080_0000, 32'h4020_0000, 2'd0);    // 4 x 2.5 = 10
    checks++; if (result !== 32'h4120_0000) failures++;
    run(32'h7F80_0000, 32'h0000_0000, 2'd0);    // inf x 0
    run(32'h7F80_0000, 32'hC000_0000, 2'd0);
    run(32'h0000_0000, 32'hC000_0000, 2'd0);
    run(32'h7FC0_0001, 32'h3F80_0000, 2'd0);
    for (int m = 0; m < 4; m++) begin
      run(32'h7F00_0000, 32'h4100_0000, 2'(m));  // overflow
      run(32'hFF00_0000, 32'h4100_0000, 2'(m));
      run(32'h0080_0000, 32'h3F00_0000, 2'(m));  // exact subnormal
      run(32'h0080_0001, 32'h3F00_0000, 2'(m));  // inexact subnormal
      run(32'h0000_0001, 32'h0000_0001, 2'(m));  // underflow to zero
      run(32'h3F80_0001, 32'h3F80_0001, 2'(m));
      run(32'h0040_0000, 32'h4080_0000, 2'(m));  // subnormal operand
    end
    // random
    for (int i = 0; i < 6000; i++) begin
      int e;
      e = $urandom_range(1, 254);
      a = rand_operand(e);
      b = rand_operand(254 - e + $urandom_range(0, 60) - 30);
      run(a, b, 2'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
