// tb_golden_store: writes a pseudo-random pattern to every address, reads it
// all back with the one-clock read latency, and checks that a read does
// not disturb the data.
module tb_golden_store;
  localparam int DEPTH = 31920;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [14:0] addr = 0;
  logic [15:0] wdata = 0, rdata;

  golden_store #(.DEPTH(DEPTH), .W(16)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(input int a);
    return 16'((a * 40503) ^ (a >> 3) ^ 16'h5A5A);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; addr = 15'(a); wdata = pat(a);
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a += 7) begin
      addr = 15'(a);
      @(negedge clk);
      check(rdata == pat(a), $sformatf("addr %0d", a));
    end
    addr = 15'(DEPTH - 1);
    @(negedge clk);
    check(rdata == pat(DEPTH - 1), "last word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
