// tb_plc_network: end-to-end test of the polling network at its default size
// (one master, three slaves, 24-slot rings, default timers).
//
// Each slave's network layer queues NF payloads addressed to other slaves
// (slaves 0 and 1 send everything to slave 2, so that the master's ring for
// slave 2 overflows; slave 2 sends to slave 0). A payload carries its final
// destination in bytes 0-1, its source slave in byte 2, its number in byte 3
// and a pattern derived from both in the rest. The network layers refill
// their transmit rings as they drain, and empty their receive rings as frames
// arrive - except slave 2, which lets its ring fill up and stay full for a while
// so that the slave-side overflow is exercised.
//
// The physical layer's error-injection inputs follow a fixed schedule keyed on
// who sends which frame type (drop or corrupt the n-th POLL, RTS, CTS, DATA,
// ACK, ...), so that timeouts, resends, NAKs, duplicates and error closes all
// happen. The test ends when every payload has been delivered. Checks: every
// delivered payload is intact and was sent to that slave; every payload is
// delivered at least once (the protocol repeats a payload rather than risk
// losing it when an acknowledgement is lost, so a few repeats are allowed,
// never more than the number of disturbed frames); each
// protocol mechanism of master and slaves occurred at least once.
//
// Meanwhile the button of the separate two-device frame test is pushed
// four times: the first push must end with the NAK LED, the others with the
// ACK LED, each within 1200 cycles.
//
// Finally the network is reset twice more and its built-in result checker is
// started with test_button: on an undisturbed line it must light its pass LED;
// with the slaves' read data forced to zero during the read-back it must light
// its fail LED.
module tb_plc_network;
  import mac_pkg::*;

  localparam int N    = 3;
  localparam int RING = 24;
  localparam int SDAW = $clog2(RING * PAYLOAD_BYTES);
  localparam int PW   = $clog2(RING);
  localparam int NF   = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                   enable, inj_drop, inj_flip, phy_busy;
  logic [5:0]             inj_byte;
  logic [N-1:0]           nl_tx_we, nl_tx_commit, nl_rx_rd_en, nl_rx_release;
  logic [N-1:0][SDAW-1:0] nl_tx_addr, nl_tx_base, nl_rx_addr, nl_rx_base;
  logic [N-1:0][7:0]      nl_tx_wdata, nl_rx_rdata;
  logic [N-1:0][PW-1:0]   nl_tx_count, nl_rx_count, master_ring_count;
  master_ev_t             master_ev;
  slave_ev_t [N-1:0]      slave_ev;

  logic                   arq_button, arq_led_a, arq_led_b, arq_busy;
  logic                   test_button = 0, test_led_a, test_led_b;
  bit                     nl_off = 0;   // network layers stop reading: the checker owns the ports
  int                     arq_nak = 0, arq_ack = 0;

  plc_network dut (.*);

  // ---------------- the separate two-device frame test
  initial begin
    int cyc;
    arq_button = 0;
    repeat (2000) @(negedge clk);
    for (int push = 0; push < 4; push++) begin
      arq_button = 1;
      repeat (4) @(negedge clk);
      arq_button = 0;
      cyc = 0;
      while (arq_busy && cyc < 5000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc >= 1200 || arq_led_a == arq_led_b || arq_led_b != (push == 0)) begin
        failures++;
        $display("frame test push %0d: led_a=%0d led_b=%0d after %0d cycles",
                 push, arq_led_a, arq_led_b, cyc);
      end
      if (arq_led_b) arq_nak++;
      if (arq_led_a) arq_ack++;
      repeat (3000) @(negedge clk);
    end
  end

  // ---------------- payload pattern
  function automatic addr_t dest_of(input int s, input int k);
    return (s == 2) ? SLAVE_BASE_ADDR : SLAVE_BASE_ADDR + 2;
  endfunction
  function automatic logic [7:0] pbyte(input int s, input int k, input int i);
    addr_t d;
    d = dest_of(s, k);
    case (i)
      0: return {4'h0, d[11:8]};
      1: return d[7:0];
      2: return 8'(s);
      3: return 8'(k);
      default: return 8'(s * 67 + k * 13 + i * 5 + ((i * i) >> 2));
    endcase
  endfunction

  int delivered [N][NF];
  int sent_n [N];
  int bad_payloads = 0;
  bit hold_done = 0;

  // ---------------- network layers
  for (genvar s = 0; s < N; s++) begin : g_nl
    // producer: queue payloads while there is room
    initial begin
      nl_tx_we[s] = 0; nl_tx_commit[s] = 0; nl_tx_addr[s] = '0; nl_tx_wdata[s] = '0;
      sent_n[s] = 0;
      wait (rst_n);
      while (sent_n[s] < NF) begin
        @(negedge clk);
        if (32'(nl_tx_count[s]) < RING - 1) begin
          for (int i = 0; i < PAYLOAD_BYTES; i++) begin
            nl_tx_we[s]    = 1;
            nl_tx_addr[s]  = nl_tx_base[s] + SDAW'(i);
            nl_tx_wdata[s] = pbyte(s, sent_n[s], i);
            @(negedge clk);
          end
          nl_tx_we[s] = 0;
          nl_tx_commit[s] = 1;
          @(negedge clk);
          nl_tx_commit[s] = 0;
          sent_n[s]++;
        end
      end
    end
    // consumer: read and release received payloads
    initial begin
      logic [7:0] buf_b [PAYLOAD_BYTES];
      longint full_since;
      nl_rx_rd_en[s] = 0; nl_rx_release[s] = 0; nl_rx_addr[s] = '0;
      full_since = -1;
      wait (rst_n);
      forever begin
        @(negedge clk);
        if (nl_off) continue;
        if (s == 2 && !hold_done) begin
          // let this slave's receive ring fill up and stay full for a while
          if (32'(nl_rx_count[s]) == RING - 1 && full_since < 0) full_since = cycle;
          if (full_since >= 0 && cycle - full_since > 60000) hold_done = 1;
          continue;
        end
        if (nl_rx_count[s] != 0) begin
          for (int i = 0; i <= PAYLOAD_BYTES; i++) begin
            nl_rx_rd_en[s] = (i < PAYLOAD_BYTES);
            nl_rx_addr[s]  = nl_rx_base[s] + SDAW'(i);
            @(negedge clk);
            if (i < PAYLOAD_BYTES) buf_b[i] = nl_rx_rdata[s];
          end
          nl_rx_rd_en[s] = 0;
          begin
            int src, k;
            bit ok;
            src = buf_b[2];
            k   = buf_b[3];
            ok  = (src < N) && (k < NF) && (src != s);
            if (ok) for (int i = 0; i < PAYLOAD_BYTES; i++) if (buf_b[i] != pbyte(src, k, i)) ok = 0;
            if (ok) ok = (dest_of(src, k) == SLAVE_BASE_ADDR + addr_t'(s));
            checks++;
            if (!ok) begin
              failures++; bad_payloads++;
              $display("slave %0d received a wrong payload (src %0d num %0d)", s, src, k);
            end else begin
              delivered[src][k]++;
            end
          end
          nl_rx_release[s] = 1;
          @(negedge clk);
          nl_rx_release[s] = 0;
        end
      end
    end
  end

  // ---------------- error injection schedule
  mac_hdr_t sl_hdr [N];
  for (genvar s = 0; s < N; s++) begin : g_hdr
    assign sl_hdr[s] = dut.g_slave[s].u_slave.u_ctrl.txh_q;
  end

  mac_hdr_t cur_hdr;
  logic     cur_is_master;
  int       occ [2][16][2];   // occurrences per (sender is master, type, mode)
  always_comb begin
    cur_is_master = dut.tx_req[0];
    cur_hdr       = dut.u_master.u_ctrl.txh_q;
    for (int s = 0; s < N; s++) if (!dut.tx_req[0] && dut.tx_req[s+1]) cur_hdr = sl_hdr[s];
  end

  bit inj_on = 0;
  always_comb begin
    int n;
    n = occ[cur_is_master][cur_hdr.ftype][cur_hdr.mode[0]];
    inj_drop = 0; inj_flip = 0; inj_byte = 6'd0;
    if (inj_on) begin
      if (cur_is_master) begin
        unique case (cur_hdr.ftype)
          FT_POLL: if (n == 2 || n == 9) begin inj_flip = 1; inj_byte = 6'd2; end
          FT_CTS:  if (n == 3) begin inj_flip = 1; inj_byte = 6'd5; end
          FT_ACK:  if (cur_hdr.mode == MODE_UP && (n == 5 || n == 14 || n == 30)) inj_drop = 1;
          FT_DATA: if (n % 9 == 4 || n == 22) begin inj_flip = 1; inj_byte = 6'd30; end
          default: ;
        endcase
      end else begin
        unique case (cur_hdr.ftype)
          FT_RTS:  if (n == 4 || n == 5) inj_drop = 1;
          FT_CTS:  if (cur_hdr.mode == MODE_DOWN && n == 2) inj_drop = 1;
          FT_DATA: if (n % 7 == 3) begin inj_flip = 1; inj_byte = 6'd20; end
                   else if (n == 12) inj_drop = 1;
          FT_ACK:  if (cur_hdr.mode == MODE_DOWN && (n == 6 || n == 15 || n == 33)) inj_drop = 1;
          default: ;
        endcase
      end
    end
  end

  // count a frame when the physical layer accepts it
  int n_injected = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_phy.state == dut.u_phy.P_IDLE && |dut.tx_req) begin
      occ[cur_is_master][cur_hdr.ftype][cur_hdr.mode[0]]++;
      if (inj_drop || inj_flip) n_injected++;
    end
  end

  // ---------------- mechanism coverage
  int mcnt [14];
  int scnt [12];
  always @(posedge clk) begin
    for (int b = 0; b < 14; b++) if (master_ev[b]) mcnt[b]++;
    for (int s = 0; s < N; s++) for (int b = 0; b < 12; b++) if (slave_ev[s][b]) scnt[b]++;
  end
  string mname [14] = '{"long_wait", "tne_rx", "nak_sent", "data_acked", "overflow", "duplicate",
                        "data_stored", "conn_expired", "err_close", "bad_frame", "timeout",
                        "resend", "skip", "poll"};
  string sname [12] = '{"close_wait", "no_data", "cne_rx", "data_acked", "overflow", "duplicate",
                        "data_stored", "err_close", "bad_frame", "timeout", "resend", "polled"};

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_delivered(input int upto);
    for (int s = 0; s < N; s++) for (int k = 0; k < upto; k++) if (delivered[s][k] == 0) return 0;
    return 1;
  endfunction

  initial begin
    int n_dup = 0;
    enable = 0;
    foreach (occ[a, b, c]) occ[a][b][c] = 0;
    foreach (delivered[a, b]) delivered[a][b] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    enable = 1;
    inj_on = 1;
    while (!all_delivered(NF)) @(negedge clk);
    repeat (100) @(negedge clk);
    $display("all payloads delivered at cycle %0d", cycle);
    for (int s = 0; s < N; s++) for (int k = 0; k < NF; k++) begin
      checks++;
      if (delivered[s][k] < 1) begin failures++; $display("payload %0d/%0d lost", s, k); end
      if (delivered[s][k] > 1) n_dup += delivered[s][k] - 1;
    end
    // A payload is repeated only when an acknowledgement was lost and the
    // connection closed before the retry: each repeat needs an injected error.
    $display("%0d frames disturbed, %0d payloads delivered twice", n_injected, n_dup);
    checks++;
    if (n_dup > n_injected) begin failures++; $display("more repeats than line errors"); end
    checks++;
    if (bad_payloads != 0) failures++;
    for (int b = 0; b < 14; b++) begin
      $display("master %-13s %0d", mname[b], mcnt[b]);
      checks++;
      if (mcnt[b] == 0) begin failures++; $display("master mechanism %s never happened", mname[b]); end
    end
    for (int b = 0; b < 12; b++) begin
      $display("slave  %-13s %0d", sname[b], scnt[b]);
      checks++;
      if (scnt[b] == 0) begin failures++; $display("slave mechanism %s never happened", sname[b]); end
    end
    $display("frame test       nak %0d ack %0d", arq_nak, arq_ack);
    checks++;
    if (arq_nak == 0 || arq_ack == 0) begin failures++; $display("frame test incomplete"); end

    // The built-in result checker: after a reset, one push must end with the
    // pass LED on an undisturbed line. A second run, with the slaves' read
    // data forced to zero while the checker reads it back, must end with the
    // fail LED.
    nl_off = 1;
    inj_on = 0;
    enable = 0;
    for (int run = 0; run < 2; run++) begin
      longint t0;
      @(negedge clk);
      rst_n = 0;
      repeat (5) @(negedge clk);
      rst_n = 1;
      repeat (5) @(negedge clk);
      test_button = 1;
      repeat (10) @(negedge clk);
      test_button = 0;
      t0 = cycle;
      if (run == 1) begin
        wait (dut.u_check.state == dut.u_check.C_READ);
        force dut.nl_rx_rdata = '0;
      end
      while (!test_led_a && !test_led_b && cycle - t0 < 1500000) @(negedge clk);
      if (run == 1) release dut.nl_rx_rdata;
      $display("result checker run %0d: led_a=%0d led_b=%0d after %0d cycles",
               run, test_led_a, test_led_b, cycle - t0);
      checks++;
      if (test_led_a == test_led_b || test_led_b != (run == 1)) begin
        failures++;
        $display("result checker run %0d gave the wrong verdict", run);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
