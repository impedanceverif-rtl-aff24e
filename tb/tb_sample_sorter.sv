// tb_sample_sorter: inserts 105 random samples (with duplicates) and checks
// after every insertion that the first `fill` entries are the inserted
// samples in ascending order (reference: a sorted copy kept here); also
// checks clear and that a full sorter ignores further inserts.
module tb_sample_sorter;
  localparam int N = 105;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, ins = 0;
  logic [15:0] din = 0, rd_data;
  logic [6:0] rd_idx = 0;
  logic [6:0] fill;
  int unsigned ref_q [$];

  sample_sorter #(.N(N), .W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic compare_all();
    for (int k = 0; k < ref_q.size(); k++) begin
      rd_idx = 7'(k); #1;
      check(rd_data == 16'(ref_q[k]), $sformatf("entry %0d: %0d expected %0d", k, rd_data, ref_q[k]));
    end
    @(negedge clk);   // back in step with the clock
  endtask

  task automatic insert_ref(input int unsigned v);
    int pos;
    pos = ref_q.size();
    for (int k = 0; k < ref_q.size(); k++) if (ref_q[k] > v) begin pos = k; break; end
    ref_q.insert(pos, v);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      ref_q.delete();
      check(fill == 0, "cleared");
      for (int i = 0; i < N; i++) begin
        din = 16'(round == 0 ? ($urandom % 40) + 100 : $urandom);
        ins = 1;
        insert_ref(int'(din));
        @(negedge clk) ins = 0;
        check(int'(fill) == i + 1, "fill count");
        if (i % 13 == 0 || i == N - 1) compare_all();
      end
    end
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
