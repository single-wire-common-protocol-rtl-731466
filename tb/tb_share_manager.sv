// tb_share_manager: checks the share formula, share use and the cycle reload.
//
// Nine instances cover the share formula S + (N-1-2j), S = K-1, clamped at 1,
// for N = 2, K = 4 (4, 2), N = 4, K = 2 (4, 2, 1, 1) and N = 3, K = 3
// (4, 2, 1), plus a slave-only node (0). The first instance is then driven
// with a bit strobe every clock: its shares are used up, sending is refused
// at zero, and the reload must come exactly N*K*(93+2) = 760 slots after
// reset.
module tb_share_manager;
  import swmm_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, consume = 0;
  always #5 clk = ~clk;

  logic [11:0] left [9];
  logic        can  [9];
  logic        rel  [9];

  localparam int NS [9] = '{2, 2, 4, 4, 4, 4, 3, 3, 2};
  localparam int KS [9] = '{4, 4, 2, 2, 2, 2, 3, 3, 4};
  localparam int RS [9] = '{0, 1, 0, 1, 2, 3, 0, 1, 0};
  localparam bit MS [9] = '{1, 1, 1, 1, 1, 1, 1, 1, 0};
  localparam int EXP[9] = '{4, 2, 4, 2, 1, 1, 4, 2, 0};

  for (genvar g = 0; g < 9; g++) begin : g_dut
    share_manager #(.N_MASTERS(NS[g]), .K(KS[g]), .RANK(RS[g]), .IS_MASTER(MS[g])) dut (
      .clk, .rst_n, .bit_tick(1'b1), .consume(g == 0 ? consume : 1'b0),
      .share_left(left[g]), .can_send(can[g]), .reload(rel[g]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int ticks_to_reload;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    #1;
    for (int g = 0; g < 9; g++) begin
      check(int'(left[g]) == EXP[g], $sformatf("share_left[%0d]=%0d exp %0d", g, left[g], EXP[g]));
      check(can[g] == (EXP[g] > 0), $sformatf("can_send[%0d]", g));
    end
    // Use up the four shares of instance 0.
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) consume = 1;
      @(negedge clk) consume = 0;
      check(int'(left[0]) == 3 - i, $sformatf("after use %0d left=%0d", i, left[0]));
    end
    check(!can[0], "no sending with share 0");
    check(!rel[0], "no reload yet");
    // Wait for the reload; count slots from reset release.
    ticks_to_reload = 0;
    while (!rel[0]) begin
      @(posedge clk);
      #1;
    end
    check(rel[0], "reload came");
    @(posedge clk);
    #1;
    check(int'(left[0]) == 4, $sformatf("reloaded to %0d", left[0]));
    check(can[0], "may send again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Slot count at the reload, measured independently.
  int slot_no = 0;
  always @(posedge clk) if (rst_n) begin
    if (rel[0]) begin
      checks++;
      if (slot_no != 2*4*(93+2) - 1) begin
        failures++;
        $display("FAIL reload at slot %0d", slot_no);
      end
    end
    slot_no <= slot_no + 1;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
