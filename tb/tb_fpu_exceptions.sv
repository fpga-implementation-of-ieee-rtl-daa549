// tb_fpu_exceptions: self-checking test of the exception logic.
//
// Feeds results and operands drawn from every class (zeros, subnormals, normals,
// infinities, quiet and signalling NaNs) with random unit status and every op-code,
// and checks each of the eight exception bits against a classification written
// directly from the binary32 bit fields.
module tb_fpu_exceptions;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  logic         clk = 1'b0;
  fpu_op_e      op;
  logic [31:0]  opa, opb, result;
  unit_status_t status;
  fpu_exc_t     exc;

  int checks = 0, failures = 0;

  fpu_exceptions dut (
    .op_i(op), .opa_i(opa), .opb_i(opb), .result_i(result), .status_i(status), .exc_o(exc)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic tb_snan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22] == 1'b0 && x[21:0] != 0;
  endfunction

  initial begin
    logic [7:0] want;
    for (int i = 0; i < 5000; i++) begin
      op     = fpu_op_e'(3'($urandom_range(0, 4)));
      opa    = rand_operand($urandom_range(1, 254));
      opb    = rand_operand($urandom_range(1, 254));
      result = rand_operand($urandom_range(1, 254));
      status = unit_status_t'($urandom);
      @(posedge clk);
      want = {status.ine, status.overflow, status.underflow, status.div_zero,
              result[30:0] == {8'hFF, 23'd0},
              result[30:0] == 31'd0,
              result[30:23] == 8'hFF && result[22:0] != 0,
              tb_snan(opa) || (op != OP_SQRT && tb_snan(opb))};
      checks++;
      if (exc !== want) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h r=%h got %b want %b",
                                    op, opa, opb, result, exc, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
