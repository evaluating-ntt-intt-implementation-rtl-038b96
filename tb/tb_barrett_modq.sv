// tb_barrett_modq: checks the Barrett reducer against the '%' operator on
// boundary values (multiples of Q and their neighbours, the largest
// butterfly operands, the all-ones input) and on 200000 random 24-bit inputs.
module tb_barrett_modq;
  localparam int Q = 3329;
  logic        clk = 1'b0;
  logic [23:0] x;
  logic [11:0] r;
  int checks = 0, failures = 0;

  barrett_modq dut (.x, .r);

  always #5 clk = ~clk;

  task automatic check(input logic [23:0] v);
    x = v;
    #1;
    checks++;
    if (int'(r) != int'(v) % Q) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d r=%0d expected %0d", v, r, int'(v) % Q);
    end
  endtask

  initial begin
    for (int m = 0; m < 8; m++)
      for (int d = -2; d <= 2; d++)
        if (m * Q + d >= 0) check(24'(m * Q + d));
    check(24'(Q * Q - 1));
    check(24'(Q * Q));
    check(24'((Q - 1) + (Q - 1) * (Q - 1)));
    check(24'hFFFFFF);
    for (int i = 0; i < 200000; i++) check(24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
