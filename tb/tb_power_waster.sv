// tb_power_waster: random row enables; every row must toggle at its chain
// end exactly in the clocks after it was enabled and hold otherwise, so the
// switching activity equals the number of enabled rows.
module tb_power_waster;
  localparam int ROWS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0] act = '0, row_out, prev_out, prev_act;

  power_waster #(.ROWS(ROWS), .CHAIN_LEN(6)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int toggles, enabled;
    toggles = 0; enabled = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(row_out == '0, "reset state");
    for (int n = 0; n < 500; n++) begin
      prev_out = row_out;
      prev_act = act;
      @(posedge clk); #1;
      check((row_out ^ prev_out) == prev_act, $sformatf("cycle %0d toggles", n));
      toggles += $countones(row_out ^ prev_out);
      enabled += $countones(prev_act);
      @(negedge clk);
      act = ROWS'($urandom);
    end
    check(toggles == enabled && toggles > 0, "activity equals enabled rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
