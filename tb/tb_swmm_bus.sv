// tb_swmm_bus: checks the wired-OR wire with pull-down.
//
// Drives every write-line pattern of a 4-node bus and random patterns of a
// 12-node bus, and compares the wire level with the OR of the write lines
// and the driver count with a population count computed here.
module tb_swmm_bus;
  int checks = 0, failures = 0;

  logic [3:0]  wr4;
  logic        rd4;
  logic [2:0]  n4;
  logic [11:0] wr12;
  logic        rd12;
  logic [3:0]  n12;

  swmm_bus #(.N_NODES(4))  dut4  (.wr(wr4),  .rd(rd4),  .n_high(n4));
  swmm_bus #(.N_NODES(12)) dut12 (.wr(wr12), .rd(rd12), .n_high(n12));

  function automatic int ones(logic [31:0] v);
    int c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    for (int p = 0; p < 16; p++) begin
      wr4 = 4'(p);
      #1;
      check(rd4, (p != 0), $sformatf("rd4 for %b", wr4));
      checks++;
      if (int'(n4) != ones(32'(p))) begin
        failures++;
        $display("FAIL n4 for %b: %0d", wr4, n4);
      end
    end
    wr12 = '0;
    #1;
    check(rd12, 1'b0, "idle wire is pulled low");
    for (int t = 0; t < 200; t++) begin
      wr12 = 12'($urandom) & 12'($urandom);
      #1;
      check(rd12, (wr12 != 0), $sformatf("rd12 for %b", wr12));
      checks++;
      if (int'(n12) != ones(32'(wr12))) begin
        failures++;
        $display("FAIL n12 for %b: %0d", wr12, n12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
