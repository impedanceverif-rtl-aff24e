// tb_tamper_response: loads a key, checks it is held, zeroizes it with a
// tamper pulse, checks the key stays zero and further loads are refused,
// and that reset re-arms the block.
module tb_tamper_response;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tamper = 0, key_load = 0, zeroized;
  logic [127:0] key_in = '0, key_out;

  tamper_response #(.KEY_W(128)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [127:0] k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk) begin key_in = k; key_load = 1; end
      @(negedge clk) key_load = 0;
      check(key_out == k && !zeroized, "key loaded");
      repeat (5) @(negedge clk);
      check(key_out == k, "key held");
      tamper = 1;
      @(negedge clk) tamper = 0;
      check(key_out == '0 && zeroized, "zeroized");
      key_in = ~k; key_load = 1;
      @(negedge clk) key_load = 0;
      check(key_out == '0 && zeroized, "load refused after tamper");
      rst_n = 0;
      @(negedge clk) rst_n = 1;
      check(!zeroized && key_out == '0, "reset re-arms");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
