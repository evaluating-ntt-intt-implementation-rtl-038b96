// tb_regbank: writes a 256 x 12-bit register bank through both write ports
// at once, reads it back through both read ports and compares with a shadow
// array; then checks that a write to one port leaves every other word alone.
module tb_regbank;
  logic clk = 1'b0;
  logic [1:0]       we;
  logic [1:0][7:0]  waddr, raddr;
  logic [1:0][11:0] wdata, rdata;
  logic [11:0] shadow [256];
  int checks = 0, failures = 0;

  regbank dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic readall();
    for (int a = 0; a < 256; a += 2) begin
      raddr[0] = 8'(a);
      raddr[1] = 8'(255 - a);
      #1;
      checks += 2;
      if (rdata[0] != shadow[a])       failures++;
      if (rdata[1] != shadow[255 - a]) failures++;
    end
  endtask

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    // fill: port 0 even words, port 1 odd words, in the same cycles
    for (int a = 0; a < 256; a += 2) begin
      @(negedge clk);
      we = 2'b11;
      waddr[0] = 8'(a);     wdata[0] = 12'($urandom);
      waddr[1] = 8'(a + 1); wdata[1] = 12'($urandom);
      shadow[a] = wdata[0]; shadow[a + 1] = wdata[1];
    end
    @(negedge clk); we = '0;
    readall();
    // random single and dual writes
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 2'($urandom);
      waddr[0] = 8'($urandom); wdata[0] = 12'($urandom);
      waddr[1] = waddr[0] ^ 8'(1 + $urandom % 255); wdata[1] = 12'($urandom);
      if (we[0]) shadow[waddr[0]] = wdata[0];
      if (we[1]) shadow[waddr[1]] = wdata[1];
    end
    @(negedge clk); we = '0;
    readall();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
