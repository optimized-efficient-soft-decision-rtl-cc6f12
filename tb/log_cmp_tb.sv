// log_cmp_tb: self-check of the logarithmic-depth comparator.
// Random operand pairs (including equal pairs and pairs that differ only in
// one low subword) and the worked example of 8-bit operands are compared
// with the result of the ordinary relational operators.
module log_cmp_tb;
  localparam int W = 17;
  logic [W-1:0] a, b;
  logic [1:0]   res;
  logic [7:0]   a8, b8;
  logic [1:0]   res8;
  int checks = 0, failures = 0;

  log_cmp #(.W(W)) dut  (.a(a),  .b(b),  .res(res));
  log_cmp #(.W(8))  dut8 (.a(a8), .b(b8), .res(res8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [1:0] want;
    a = x; b = y;
    #1;
    want = (x == y) ? 2'b00 : (x < y) ? 2'b01 : 2'b10;
    checks++;
    if (res !== want) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h res=%b want=%b", x, y, res, want);
    end
  endtask

  initial begin
    // example: A = 10 00 10 01, B = 01 11 10 11 -> A > B
    a8 = 8'b10_00_10_01; b8 = 8'b01_11_10_11;
    #1;
    checks++;
    if (res8 !== 2'b10) begin failures++; $display("FAIL example res=%b", res8); end
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] x, y;
      x = W'($urandom());
      case (i % 4)
        0: y = W'($urandom());
        1: y = x;
        2: y = x ^ (W'(1) << $urandom_range(W-1, 0));
        default: y = x + W'($urandom_range(3, 0)) - W'(1);
      endcase
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
