// tb_host_cmd: feeds command bytes to the interpreter and checks the start
// pulses, the PDN selection (also that it is held while busy), the status
// reply and the WD-profile dump (3 bytes per point, most significant byte
// first) against the values served by a stand-in transmitter and profile.
module tb_host_cmd;
  import iv_pkg::*;
  localparam int NF = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx_valid = 0, tx_start, tx_busy = 0;
  logic [7:0] rx_data = 0, tx_data;
  status_t status = '0;
  logic [FIDX_W-1:0] wdp_idx;
  logic [WD_W-1:0] wdp_sum;
  logic start_enroll, start_verify, pdn_sel;
  int n_enroll = 0, n_verify = 0;
  logic [7:0] sent [$];

  host_cmd #(.NUM_FREQ_P(NF)) dut (.*);

  always #5 clk = ~clk;

  // profile: a recognisable value per index
  assign wdp_sum = 24'h10_2030 + 24'(wdp_idx) * 24'h01_0101;

  // stand-in transmitter: busy for 7 clocks after each start
  int tcount = 0;
  always @(posedge clk) begin
    if (tx_start) begin
      sent.push_back(tx_data);
      tx_busy <= 1'b1;
      tcount  <= 7;
    end else if (tcount > 0) begin
      tcount <= tcount - 1;
      if (tcount == 1) tx_busy <= 1'b0;
    end
    if (rst_n && start_enroll) n_enroll++;
    if (rst_n && start_verify) n_verify++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b);
    @(negedge clk) begin rx_data = b; rx_valid = 1; end
    @(negedge clk) rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(CMD_ENROLL);  check(n_enroll == 1 && n_verify == 0, $sformatf("enroll pulse %0d %0d", n_enroll, n_verify));
    send(CMD_VERIFY);  check(n_verify == 1 && n_enroll == 1, "verify pulse");
    send(8'h00);       check(n_verify == 1 && n_enroll == 1, "unknown byte ignored");
    send(CMD_IO);      check(pdn_sel == 1'b1, "select I/O PDN");
    status.busy = 1;
    send(CMD_CORE);    check(pdn_sel == 1'b1, "selection held while busy");
    status.busy = 0;
    send(CMD_CORE);    check(pdn_sel == 1'b0, "select core PDN");
    status = '{rsvd: 2'b00, zeroized: 1'b1, pdn_io: 1'b0, enrolled: 1'b1, tamper: 1'b1, done: 1'b1, busy: 1'b0};
    sent.delete();
    send(CMD_STATUS);
    repeat (20) @(negedge clk);
    check(sent.size() == 1 && sent[0] == 8'b0010_1110, "status byte");
    sent.delete();
    send(CMD_WDUMP);
    repeat (NF * 3 * 12) @(negedge clk);
    check(sent.size() == NF * 3, $sformatf("dump length %0d", sent.size()));
    for (int i = 0; i < NF && 3 * i + 2 < sent.size(); i++) begin
      logic [23:0] v;
      v = 24'h10_2030 + 24'(i) * 24'h01_0101;
      check({sent[3*i], sent[3*i+1], sent[3*i+2]} == v, $sformatf("dump word %0d", i));
    end
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
