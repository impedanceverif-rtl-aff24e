// tb_ring_oscillator: measures the model's period at several supply
// voltages (expected 2 * STAGES * 0.4 ns * 1000 / V_mV) and checks that a
// disabled oscillator stays low.
module tb_ring_oscillator;
  int checks = 0, failures = 0;
  function automatic real rabs(input real x); return x < 0.0 ? -x : x; endfunction
  logic en = 0;
  logic [15:0] vdd_mv = 16'd1000;
  logic ro_out;

  ring_oscillator #(.STAGES(5), .STAGE_PS_1V(400)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(input int mv);
    realtime t0, t1, expect_ns;
    vdd_mv = 16'(mv);
    @(posedge ro_out);
    @(posedge ro_out); t0 = $realtime;
    repeat (10) @(posedge ro_out);
    t1 = $realtime;
    expect_ns = 2.0 * 5.0 * 0.4 * 1000.0 / real'(mv);
    check(rabs((t1 - t0) / 10.0 - expect_ns) < 0.01,
          $sformatf("%0d mV: period %f ns, expected %f", mv, (t1 - t0) / 10.0, expect_ns));
  endtask

  initial begin
    #20;
    check(ro_out == 1'b0, "disabled output low");
    en = 1;
    measure(1000);
    measure(900);
    measure(1100);
    measure(3300);
    en = 0;
    #10;
    check(ro_out == 1'b0, "stops low when disabled");
    #50;
    check(ro_out == 1'b0, "stays low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
