// tb_coef_ram: self-checking test of the coefficient RAM.
//
// Fills a small RAM (one 8 x 8 matrix) with values derived from the address
// by a fixed formula, then reads it back in column order and in random order
// and checks each word one clock after its address. Finally overwrites some
// words and checks that only those change.
module tb_coef_ram;
  localparam int DEPTH = 64, BW = 24, AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic signed [BW-1:0] wdata = '0, rdata;
  logic signed [BW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  coef_ram #(.DEPTH(DEPTH), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic rd(input int addr);
    @(negedge clk);
    raddr = AW'(addr);
    @(negedge clk);
    check($sformatf("read %0d", addr), longint'(rdata), longint'(model[addr]));
  endtask

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      model[k] = BW'(k * 40503 - 1000000);
      we = 1; waddr = AW'(k); wdata = model[k];
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < DEPTH; k++) rd(k);
    for (int k = 0; k < 100; k++) rd($urandom_range(0, DEPTH - 1));
    for (int k = 0; k < 10; k++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      model[a] = BW'($urandom);
      we = 1; waddr = AW'(a); wdata = model[a];
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < DEPTH; k++) rd(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
