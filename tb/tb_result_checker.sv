// tb_result_checker: tests the network's built-in result checker.
//
// The checker is exercised where it lives, inside the complete network at its
// default size, with the outside network-layer ports idle. Three runs, each
// after a reset and one push of test_button:
//   0. undisturbed line: the pass LED must light, and the checker must have
//      read back every payload it loaded (4 per slave);
//   1. one payload byte (byte 20 of a payload at slave 1) flipped on its way
//      from the ring to the checker: the fail LED must light;
//   2. every frame dropped by the physical layer: nothing arrives, so the
//      fail LED must light once the checker's timeout (1,000,000 cycles) ends.
// Each run also checks that the LEDs stay dark before the verdict, that the
// checker holds the master enable while it loads, and that the verdict
// arrives in time.
module tb_result_checker;
  import mac_pkg::*;

  localparam int N    = 3;
  localparam int RING = 24;
  localparam int SDAW = $clog2(RING * PAYLOAD_BYTES);
  localparam int PW   = $clog2(RING);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                   enable = 0, inj_drop = 0, inj_flip = 0, phy_busy;
  logic [5:0]             inj_byte = '0;
  logic [N-1:0]           nl_tx_we = '0, nl_tx_commit = '0, nl_rx_rd_en = '0, nl_rx_release = '0;
  logic [N-1:0][SDAW-1:0] nl_tx_addr = '0, nl_rx_addr = '0;
  logic [N-1:0][SDAW-1:0] nl_tx_base, nl_rx_base;
  logic [N-1:0][7:0]      nl_tx_wdata = '0;
  logic [N-1:0][7:0]      nl_rx_rdata;
  logic [N-1:0][PW-1:0]   nl_tx_count, nl_rx_count, master_ring_count;
  master_ev_t             master_ev;
  slave_ev_t [N-1:0]      slave_ev;
  logic                   arq_button = 0, arq_led_a, arq_led_b, arq_busy;
  logic                   test_button = 0, test_led_a, test_led_b;

  plc_network dut (.*);

  // Payloads the checker releases, counted per slave.
  int released [N];
  always @(posedge clk)
    for (int s = 0; s < N; s++) if (rst_n && dut.s_rx_release[s]) released[s]++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      longint t0;
      bit dark, no_run_while_loading, forced;
      int n_forced;
      @(negedge clk);
      rst_n = 0;
      repeat (5) @(negedge clk);
      rst_n = 1;
      foreach (released[s]) released[s] = 0;
      inj_drop = (run == 2);
      repeat (5) @(negedge clk);
      check(!test_led_a && !test_led_b, "LEDs dark after reset");
      test_button = 1;
      repeat (10) @(negedge clk);
      test_button = 0;
      t0 = cycle;
      dark = 1;
      forced = 0;
      n_forced = 0;
      no_run_while_loading = 1;
      while (!test_led_a && !test_led_b && cycle - t0 < 1200000) begin
        @(negedge clk);
        if (forced) begin release dut.nl_rx_rdata; forced = 0; end
        if (run == 1 && n_forced == 0 && dut.u_check.state == dut.u_check.C_READ &&
            dut.u_check.rvalid_q && dut.u_check.jr_q == 6'd20 && dut.u_check.d_q == 1) begin
          logic [N-1:0][7:0] v;
          v = dut.nl_rx_rdata;
          v[1] = v[1] ^ 8'h10;
          force dut.nl_rx_rdata = v;
          forced = 1;
          n_forced++;
        end
        if (dut.u_check.state == dut.u_check.C_LOAD && dut.m_enable) no_run_while_loading = 0;
        if (cycle - t0 < 5000 && (test_led_a || test_led_b)) dark = 0;
      end
      if (run == 1) check(n_forced == 1, "one byte corrupted");
      $display("run %0d: led_a=%0d led_b=%0d after %0d cycles, released %0d %0d %0d",
               run, test_led_a, test_led_b, cycle - t0, released[0], released[1], released[2]);
      check(dark, "no verdict before the transfers could finish");
      check(no_run_while_loading, "master held while the checker loads");
      check(test_led_a != test_led_b, "exactly one LED lit");
      check(test_led_a == (run == 0), "verdict");
      if (run == 0) begin
        for (int s = 0; s < N; s++) check(released[s] == 2 * (N - 1), "every payload read back");
        check(cycle - t0 < 200000, "pass within 200000 cycles");
      end
      if (run == 2) check(cycle - t0 >= 1000000, "fail only after the timeout");
      // The verdict holds.
      repeat (1000) @(negedge clk);
      check(test_led_a == (run == 0) && test_led_b == (run != 0), "verdict holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
