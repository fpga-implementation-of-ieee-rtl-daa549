// tb_fpu: end-to-end self-checking test of the complete arithmetic unit.
//
// Runs the unit exactly as it is built (no parameters to override) through:
//   - the five worked examples of its specification: 2.5 + 4 = 6.5,
//     2.5 - 4 = -1.5, 4 x 2.5 = 10, 16 / 4 = 4, sqrt(16) = 4;
//   - several thousand random operations of all five kinds in all four rounding
//     modes, each checked for the 32-bit output and all eight exception outputs
//     against the exact-integer reference model, and for its latency
//     (start edge to ready: add/sub 4, mul 8, div 31, sqrt 30 clock edges);
//   - a start while busy (the running operation is abandoned and the new one
//     completes with its full latency) and an unused op-code.
// It counts how often each mechanism happened (each operation, each rounding mode,
// each of the eight exceptions, a subnormal result, a restart, an unused op-code)
// and counts a failure for any that never did.
module tb_fpu;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] opa = '0, opb = '0;
  logic [2:0]  op = '0;
  logic [1:0]  rmode = '0;
  logic        start = 1'b0;
  logic [31:0] out;
  logic        ready, ine, overflow, underflow, div_zero, inf, zero, qnan, snan;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_op[8];
  int n_rm[4];
  int n_exc[8];   // ine, overflow, underflow, div_zero, inf, zero, qnan, snan
  int n_subnormal = 0, n_restart = 0;

  fpu dut (
    .clk_i(clk), .opa_i(opa), .opb_i(opb), .fpu_op_i(op), .rmode_i(rmode), .start_i(start),
    .output_o(out), .ready_o(ready), .ine_o(ine), .overflow_o(overflow),
    .underflow_o(underflow), .div_zero_o(div_zero), .inf_o(inf), .zero_o(zero),
    .qnan_o(qnan), .snan_o(snan)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int latency_of(logic [2:0] o);
    case (o)
      3'd0, 3'd1: return 4;
      3'd2:       return 8;
      3'd3:       return 31;
      3'd4:       return 30;
      default:    return 2;
    endcase
  endfunction

  function automatic ref_t reference(logic [2:0] o, logic [31:0] a, logic [31:0] b, logic [1:0] rm);
    case (o)
      3'd0:    return ref_add(a, b, 1'b0, rm);
      3'd1:    return ref_add(a, b, 1'b1, rm);
      3'd2:    return ref_mul(a, b, rm);
      3'd3:    return ref_div(a, b, rm);
      3'd4:    return ref_sqrt(a, rm);
      default: return '0;
    endcase
  endfunction

  task automatic issue(input logic [2:0] o, input logic [31:0] a, input logic [31:0] b,
                       input logic [1:0] rm);
    @(negedge clk);
    op = o; opa = a; opb = b; rmode = rm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    opa = $urandom; opb = $urandom; op = 3'($urandom); rmode = 2'($urandom);
  endtask

  task automatic finish_and_check(input logic [2:0] o, input logic [31:0] a,
                                  input logic [31:0] b, input logic [1:0] rm);
    ref_t       r;
    int         cycles;
    logic [7:0] want, got;
    cycles = 1;
    while (!ready && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    r = reference(o, a, b, rm);
    want = {r.ine, r.overflow, r.underflow, r.div_zero,
            r.result[30:0] == {8'hFF, 23'd0}, r.result[30:0] == 31'd0,
            r.result[30:23] == 8'hFF && r.result[22:0] != 0,
            (a[30:23] == 8'hFF && !a[22] && a[21:0] != 0) ||
            (o != 3'd4 && b[30:23] == 8'hFF && !b[22] && b[21:0] != 0)};
    if (o > 3'd4) want = 8'b0000_0100;            // unused op-code: zero result
    got = {ine, overflow, underflow, div_zero, inf, zero, qnan, snan};
    checks++;
    if (out !== r.result || got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL op=%0d a=%h b=%h rm=%0d: got %h %b want %h %b",
                                  o, a, b, rm, out, got, r.result, want);
    end
    checks++;
    if (cycles != latency_of(o)) begin
      failures++;
      if (failures < 20) $display("FAIL op=%0d latency %0d want %0d", o, cycles, latency_of(o));
    end
    n_op[o]++;
    n_rm[rm]++;
    for (int k = 0; k < 8; k++) if (got[7-k]) n_exc[k]++;
    if (out[30:23] == 8'd0 && out[22:0] != 0) n_subnormal++;
  endtask

  task automatic run(input logic [2:0] o, input logic [31:0] a, input logic [31:0] b,
                     input logic [1:0] rm);
    issue(o, a, b, rm);
    finish_and_check(o, a, b, rm);
  endtask

  initial begin
    logic [31:0] a, b;
    logic [2:0]  o;
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_rm[i]) n_rm[i] = 0;
    foreach (n_exc[i]) n_exc[i] = 0;

    // the worked examples
    run(3'd0, 32'h4020_0000, 32'h4080_0000, 2'd0);
    checks++; if (out !== 32'h40D0_0000) failures++;
    run(3'd1, 32'h4020_0000, 32'h4080_0000, 2'd0);
    checks++; if (out !== 32'hBFC0_0000) failures++;
    run(3'd2, 32'h4080_0000, 32'h4020_0000, 2'd0);
    checks++; if (out !== 32'h4120_0000) failures++;
    run(3'd3, 32'h4180_0000, 32'h4080_0000, 2'd0);
    checks++; if (out !== 32'h4080_0000) failures++;
    run(3'd4, 32'h4180_0000, 32'h0000_0000, 2'd0);
    checks++; if (out !== 32'h4080_0000) failures++;

    // exceptions that random operands reach only rarely
    run(3'd3, 32'h3F80_0000, 32'h0000_0000, 2'd0);     // divide by zero
    run(3'd2, 32'h7F00_0000, 32'h4100_0000, 2'd1);     // overflow
    run(3'd2, 32'h0080_0001, 32'h3F00_0000, 2'd0);     // underflow
    run(3'd0, 32'h7FA0_0000, 32'h3F80_0000, 2'd0);     // signalling NaN

    // restart: a new start while a division is running
    issue(3'd3, 32'h4049_0FDB, 32'h402D_F854, 2'd0);
    repeat (7) @(negedge clk);
    checks++;
    if (ready) failures++;
    n_restart++;
    run(3'd2, 32'h4049_0FDB, 32'h402D_F854, 2'd2);

    // unused op-codes
    run(3'd5, 32'h3F80_0000, 32'h3F80_0000, 2'd0);
    run(3'd7, 32'h3F80_0000, 32'h3F80_0000, 2'd0);

    // random operations
    for (int i = 0; i < 5000; i++) begin
      int e;
      o = 3'($urandom_range(0, 4));
      e = $urandom_range(1, 254);
      a = rand_operand(e);
      b = rand_operand((o == 3'd2) ? 254 - e : e);
      if (o == 3'd4 && $urandom_range(0, 3) != 0) a[31] = 1'b0;
      run(o, a, b, 2'($urandom));
    end

    // every mechanism must have happened
    for (int k = 0; k < 5; k++) begin
      checks++; if (n_op[k] == 0) begin failures++; $display("op %0d never ran", k); end
    end
    checks++; if (n_op[5] + n_op[6] + n_op[7] == 0) failures++;
    for (int k = 0; k < 4; k++) begin
      checks++; if (n_rm[k] == 0) begin failures++; $display("rounding mode %0d never used", k); end
    end
    for (int k = 0; k < 8; k++) begin
      checks++; if (n_exc[k] == 0) begin failures++; $display("exception %0d never raised", k); end
    end
    checks++; if (n_subnormal == 0) begin failures++; $display("no subnormal result"); end
    checks++; if (n_restart == 0) failures++;
    $display("ops add=%0d sub=%0d mul=%0d div=%0d sqrt=%0d unused=%0d", n_op[0], n_op[1],
             n_op[2], n_op[3], n_op[4], n_op[5] + n_op[6] + n_op[7]);
    $display("exceptions ine=%0d ovf=%0d unf=%0d dz=%0d inf=%0d zero=%0d qnan=%0d snan=%0d",
             n_exc[0], n_exc[1], n_exc[2], n_exc[3], n_exc[4], n_exc[5], n_exc[6], n_exc[7]);
    $display("subnormal results=%0d restarts=%0d", n_subnormal, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
