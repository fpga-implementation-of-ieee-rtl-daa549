// tb_fpu_result_mux: self-checking test of the output multiplexer.
//
// Puts distinct random results, status bits and ready bits on the four unit inputs
// and checks, for every op-code including the unused ones, that exactly the right
// unit reaches the output (add and subtract both select the add/subtract unit; an
// unused code gives ready with a zero result and no status).
module tb_fpu_result_mux;
  import fpu_pkg::*;

  logic         clk = 1'b0;
  fpu_op_e      op;
  logic [31:0]  res [4];
  unit_status_t st  [4];
  logic         rdy [4];
  logic [31:0]  result;
  unit_status_t status;
  logic         ready;

  int checks = 0, failures = 0;

  fpu_result_mux dut (
    .op_i(op),
    .addsub_result_i(res[0]), .addsub_status_i(st[0]), .addsub_ready_i(rdy[0]),
    .mul_result_i(res[1]),    .mul_status_i(st[1]),    .mul_ready_i(rdy[1]),
    .div_result_i(res[2]),    .div_status_i(st[2]),    .div_ready_i(rdy[2]),
    .sqrt_result_i(res[3]),   .sqrt_status_i(st[3]),   .sqrt_ready_i(rdy[3]),
    .result_o(result), .status_o(status), .ready_o(ready)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          idx;
    logic [31:0] want_res;
    logic [3:0]  want_st;
    logic        want_rdy;
    for (int i = 0; i < 2000; i++) begin
      for (int u = 0; u < 4; u++) begin
        res[u] = $urandom;
        st[u]  = unit_status_t'($urandom);
        rdy[u] = 1'($urandom);
      end
      op = fpu_op_e'(3'(i % 8));
      @(posedge clk);
      case (3'(i % 8))
        3'd0, 3'd1: idx = 0;
        3'd2:       idx = 1;
        3'd3:       idx = 2;
        3'd4:       idx = 3;
        default:    idx = -1;
      endcase
      if (idx >= 0) begin
        want_res = res[idx]; want_st = st[idx]; want_rdy = rdy[idx];
      end else begin
        want_res = '0; want_st = '0; want_rdy = 1'b1;
      end
      checks++;
      if (result !== want_res || status !== want_st || ready !== want_rdy) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d got %h/%b/%b want %h/%b/%b",
                                    i % 8, result, status, ready, want_res, want_st, want_rdy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
