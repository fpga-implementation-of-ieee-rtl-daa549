// tb_addsub_unit: self-checking test of the add/subtract unit.
//
// Drives directed cases (2.5 + 4 = 6.5, 2.5 - 4 = -1.5, exact cancellation,
// infinities, NaNs, overflow, subnormal results) and a few thousand random operand
// pairs in all four rounding modes. Every result and status bit is compared with the
// exact-integer reference model, and the time from start to ready is checked against
// the unit's three-cycle latency.
module tb_addsub_unit;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int LATENCY = 3;

  logic         clk = 1'b0;
  logic         start = 1'b0;
  logic [31:0]  opa = '0, opb = '0;
  logic         sub = 1'b0;
  rmode_e       rmode = RM_NEAREST_EVEN;
  logic [31:0]  result;
  unit_status_t status;
  logic         ready;

  int checks = 0, failures = 0;

  addsub_unit dut (
    .clk_i(clk), .start_i(start), .opa_i(opa), .opb_i(opb), .sub_i(sub),
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

  task automatic run(input logic [31:0] a, input logic [31:0] b, input logic s, input logic [1:0] rm);
    ref_t exp_r;
    int   cycles;
    @(negedge clk);
    opa = a; opb = b; sub = s; rmode = rmode_e'(rm); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    opa = $urandom; opb = $urandom;        // the unit must hold its own copy
    cycles = 1;
    while (!ready && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    exp_r = ref_add(a, b, s, rm);
    checks++;
    if (result !== exp_r.result || status.ine !== exp_r.ine || status.overflow !== exp_r.overflow ||
        status.underflow !== exp_r.underflow || status.div_zero !== 1'b0) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h %s %h rm=%0d: got %h ine=%b ovf=%b unf=%b, want %h ine=%b ovf=%b unf=%b",
                 a, s ? "-" : "+", b, rm, result, status.ine, status.overflow, status.underflow,
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
    // 2.5 + 4 = 6.5 and 2.5 - 4 = -1.5
    run(32'h4020_0000, 32'h4080_0000, 1'b0, 2'd0);
    checks++; if (result !== 32'h40D0_0000) failures++;
    run(32'h4020_0000, 32'h4080_0000, 1'b1, 2'd0);
    checks++; if (result !== 32'hBFC0_0000) failures++;
    // exact cancellation: +0, or -0 toward -inf
    run(32'h3F80_0000, 32'h3F80_0000, 1'b1, 2'd0);
    run(32'h3F80_0000, 32'h3F80_0000, 1'b1, 2'd3);
    run(32'h8000_0000, 32'h8000_0000, 1'b0, 2'd0);
    // infinities and NaN
    run(32'h7F80_0000, 32'h7F80_0000, 1'b1, 2'd0);
    run(32'h7F80_0000, 32'h3F80_0000, 1'b0, 2'd0);
    run(32'h3F80_0000, 32'h7F80_0000, 1'b1, 2'd0);
    run(32'h7FA0_0000, 32'h3F80_0000, 1'b0, 2'd0);
    // overflow in every mode, subnormal result
    for (int m = 0; m < 4; m++) begin
      run(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 2'(m));
      run(32'hFF7F_FFFF, 32'h7F7F_FFFF, 1'b1, 2'(m));
      run(32'h0080_0001, 32'h0080_0000, 1'b1, 2'(m));
      run(32'h3F80_0000, 32'h3380_0000, 1'b0, 2'(m));  // 1 + 2^-24, a tie
      run(32'h3F80_0001, 32'h3380_0000, 1'b0, 2'(m));
      run(32'h3F80_0000, 32'h3380_0001, 1'b1, 2'(m));
    end
    // random
    for (int i = 0; i < 6000; i++) begin
      int e;
      e = $urandom_range(1, 254);
      a = rand_operand(e);
      b = rand_operand(e);
      run(a, b, 1'($urandom), 2'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
