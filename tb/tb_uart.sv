// tb_uart: transmitter looped back into the receiver. Checks every byte of
// a random stream arrives intact, the frame length (busy for 10 bit
// times), the idle-high line and the start/stop bit levels on the wire.
module tb_uart;
  localparam int CPB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, txd, busy, valid;
  logic [7:0] data = 0, rx_data;

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst_n, .data, .start, .txd, .busy);
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rst_n, .rxd(txd), .data(rx_data), .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] got [$];
  always @(posedge clk) if (rst_n && valid) got.push_back(rx_data);

  initial begin
    logic [7:0] sent [$];
    int busy_len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(txd == 1'b1, "line idles high");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      data = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(data);
      start = 1;
      @(negedge clk) start = 0;
      busy_len = 1;
      // middle of the start bit and of the stop bit
      repeat (CPB / 2 - 1) @(negedge clk);
      check(txd == 1'b0, "start bit low");
      repeat (9 * CPB) @(negedge clk);
      check(txd == 1'b1, "stop bit high");
      busy_len += CPB / 2 - 1 + 9 * CPB;
      while (busy) begin @(negedge clk); busy_len++; end
      check(busy_len == 10 * CPB + 1, $sformatf("frame length %0d", busy_len));
    end
    repeat (2 * CPB) @(negedge clk);
    check(got.size() == sent.size(), "byte count");
    foreach (sent[i]) if (i < got.size()) check(got[i] == sent[i], $sformatf("byte %0d %h %h", i, got[i], sent[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
