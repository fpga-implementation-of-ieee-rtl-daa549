// tb_fpu_units_left_out: self-checking test of the top built with units left out.
//
// Two copies of the arithmetic unit run side by side on the same inputs: the full
// build and one with EN_MUL = EN_SQRT = 0. Random operations of all five kinds in
// all rounding modes are issued to both. When the full build reports ready, the
// reduced one must also be ready and must agree with it bit for bit (result and all
// eight exception outputs) on add, subtract and divide. A multiply or square root
// must come back as the reduced build's unused op-codes do: ready with a zero
// result, after 2 clock edges. The full build's own results are checked elsewhere.
module tb_fpu_units_left_out;

  logic        clk = 1'b0;
  logic [31:0] opa = '0, opb = '0;
  logic [2:0]  op = '0;
  logic [1:0]  rmode = '0;
  logic        start = 1'b0;

  logic [31:0] full_out, lite_out;
  logic        full_ready, lite_ready;
  logic [7:0]  full_flags, lite_flags;

  int checks = 0, failures = 0;
  int n_kept = 0, n_dropped = 0;

  fpu dut_full (
    .clk_i(clk), .opa_i(opa), .opb_i(opb), .fpu_op_i(op), .rmode_i(rmode), .start_i(start),
    .output_o(full_out), .ready_o(full_ready), .ine_o(full_flags[7]),
    .overflow_o(full_flags[6]), .underflow_o(full_flags[5]), .div_zero_o(full_flags[4]),
    .inf_o(full_flags[3]), .zero_o(full_flags[2]), .qnan_o(full_flags[1]),
    .snan_o(full_flags[0])
  );

  fpu #(.EN_MUL(1'b0), .EN_SQRT(1'b0)) dut_lite (
    .clk_i(clk), .opa_i(opa), .opb_i(opb), .fpu_op_i(op), .rmode_i(rmode), .start_i(start),
    .output_o(lite_out), .ready_o(lite_ready), .ine_o(lite_flags[7]),
    .overflow_o(lite_flags[6]), .underflow_o(lite_flags[5]), .div_zero_o(lite_flags[4]),
    .inf_o(lite_flags[3]), .zero_o(lite_flags[2]), .qnan_o(lite_flags[1]),
    .snan_o(lite_flags[0])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [2:0] o, input logic [31:0] a, input logic [31:0] b,
                     input logic [1:0] rm);
    int cycles, lite_cycles;
    @(negedge clk);
    op = o; opa = a; opb = b; rmode = rm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    opa = $urandom; opb = $urandom; op = 3'($urandom); rmode = 2'($urandom);
    cycles = 1;
    lite_cycles = lite_ready ? 1 : 0;
    while (!full_ready && cycles < 200) begin
      @(negedge clk);
      cycles++;
      if (lite_ready && lite_cycles == 0) lite_cycles = cycles;
    end
    checks++;
    if (o == 3'd2 || o == 3'd4) begin
      n_dropped++;
      if (!lite_ready || lite_out !== 32'd0 || lite_cycles != 2) begin
        failures++;
        if (failures < 20) $display("FAIL left-out op=%0d: ready %b out %h after %0d edges",
                                    o, lite_ready, lite_out, lite_cycles);
      end
    end else begin
      n_kept++;
      if (!lite_ready || lite_out !== full_out || lite_flags !== full_flags) begin
        failures++;
        if (failures < 20) $display("FAIL kept op=%0d a=%h b=%h: %h %b want %h %b", o, a, b,
                                    lite_out, lite_flags, full_out, full_flags);
      end
    end
  endtask

  initial begin
    logic [31:0] a, b;
    logic [2:0]  o;
    for (int i = 0; i < 3000; i++) begin
      o = 3'($urandom_range(0, 4));
      a = $urandom;
      b = $urandom;
      if (i % 2 == 0) begin
        a[30:23] = 8'($urandom_range(100, 154));
        b[30:23] = 8'($urandom_range(100, 154));
      end
      run(o, a, b, 2'($urandom));
    end
    checks++; if (n_kept == 0) failures++;
    checks++; if (n_dropped == 0) failures++;
    $display("kept-unit operations=%0d left-out-unit operations=%0d", n_kept, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
