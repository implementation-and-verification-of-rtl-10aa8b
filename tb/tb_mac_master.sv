// tb_mac_master: self-checking test of the master device (mac_master, and
// through it master_ctrl, frame_tx, frame_rx and its memories).
//
// The testbench stands in for the physical layer and for three slaves. It
// reads every frame the master puts in its output memory and compares all
// 64 bytes with a frame assembled independently by the reference package
// (header fields, both CRCs, payload). It answers with frames it assembles
// the same way, written into the master's input memory, sometimes corrupted,
// sometimes missing, sometimes from the wrong device. A scripted run covers:
//   * uplink: POLL, RTS, CTS, DATA stored and ACKed with the next sequence
//     number, a repeated DATA frame re-acknowledged but not stored, a bad
//     payload CRC answered with NAK, two errors in a row closing the
//     connection with CNE_NAK, a lost reply re-sent after the header timeout
//     (the gap is checked against HDR_TIMEOUT), a frame for a full ring and
//     a frame with an unknown final destination refused, frames for other
//     devices ignored, a frame from the wrong slave refused;
//   * closing: TNE ends the long wait early, otherwise it lasts LONG_WAIT; a
//     TNE that ends a connection is answered with CNE_NAK and no long wait;
//   * downlink: empty rings skipped, DATA frames rebuilt from the store in
//     order and byte-exact, NAK and a missing ACK both re-sending the same
//     frame, CNE_ACK after the last frame;
//   * the connection time limit closing a long uplink connection.
// A model of the three rings gives the expected ring_count and the payload
// of every downlink DATA frame. Every event output of the master must fire.
// Timers are shortened through parameters so the run stays short.
module tb_mac_master;
  import mac_pkg::*;
  import tb_mac_ref::*;

  localparam int NS  = 3;
  localparam int RF  = 5;
  localparam int HT  = 300;
  localparam int FT  = 600;
  localparam int CT  = 12000;
  localparam int LW  = 1000;

  logic clk = 0, rst_n = 0, enable = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       phy_tx_req, phy_tx_done, phy_ob_rd_en, phy_ib_we, phy_rx_valid;
  logic [5:0] phy_ob_rd_addr, phy_ib_addr;
  logic [7:0] phy_ob_rd_data, phy_ib_wdata;
  logic [NS-1:0][$clog2(RF)-1:0] ring_count;
  master_ev_t ev;

  mac_master #(.N_SLAVES(NS), .RING_FRAMES(RF), .HDR_TIMEOUT(HT), .FULL_TIMEOUT(FT),
               .CONN_TIME(CT), .LONG_WAIT(LW)) dut (.*);

  // event counters, in master_ev_t order (MSB first)
  localparam int NEV = $bits(master_ev_t);
  int evn [NEV];
  string evname [NEV] = '{"poll", "skip", "resend", "timeout", "bad_frame", "err_close",
                          "conn_expired", "data_stored", "duplicate", "overflow",
                          "data_acked", "nak_sent", "tne_rx", "long_wait"};
  always_ff @(posedge clk)
    for (int i = 0; i < NEV; i++) if (ev[NEV-1-i]) evn[i]++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ring model: payloads stored for each slave
  payload_t ringm [NS][$];
  payload_t zero_pl;

  function automatic addr_t sa(input int i);
    return SLAVE_BASE_ADDR + addr_t'(i);
  endfunction

  function automatic payload_t mkpl(input addr_t route, input int tag);
    payload_t p;
    p[0] = {4'h0, route[11:8]};
    p[1] = route[7:0];
    for (int i = 2; i < PAYLOAD_BYTES; i++) p[i] = 8'((tag * 37 + i * 11) ^ (i >> 2));
    return p;
  endfunction

  // Wait for the master to send, read the frame out of its output memory.
  task automatic get_tx(output frame_t f, output int gap);
    gap = 0;
    while (!phy_tx_req && gap < 50000) begin @(negedge clk); gap++; end
    if (!phy_tx_req) begin chk(0, "master never sent"); return; end
    for (int i = 0; i < FRAME_BYTES; i++) begin
      phy_ob_rd_en = 1; phy_ob_rd_addr = 6'(i);
      @(negedge clk);
      f[i] = phy_ob_rd_data;
    end
    phy_ob_rd_en = 0;
    phy_tx_done = 1;
    @(negedge clk);
    phy_tx_done = 0;
  endtask

  task automatic expect_tx(input string tag, input int s, input ftype_e t, input mode_e m,
                           input seq_t q, input payload_t pl, output int gap);
    frame_t f, e;
    bit same = 1;
    get_tx(f, gap);
    e = make_frame(MASTER_ADDR, sa(s), t, m, q, pl);
    for (int i = 0; i < FRAME_BYTES; i++) if (f[i] !== e[i]) same = 0;
    chk(same, $sformatf("%s: expected %s mode %0d seq %0d to %03h, got type %04b seq %0d dst %03h",
                        tag, t.name(), m, q, sa(s), f[3][7:4], {f[3][1:0], f[4][7:6]},
                        {f[1][3:0], f[2]}));
  endtask

  task automatic send_rx(input frame_t f);
    for (int i = 0; i < FRAME_BYTES; i++) begin
      phy_ib_we = 1; phy_ib_addr = 6'(i); phy_ib_wdata = f[i];
      @(negedge clk);
    end
    phy_ib_we = 0;
    phy_rx_valid = 1;
    @(negedge clk);
    phy_rx_valid = 0;
  endtask

  // frame from slave s to the master
  function automatic frame_t sf(input int s, input ftype_e t, input mode_e m, input seq_t q,
                                input payload_t pl);
    return make_frame(sa(s), MASTER_ADDR, t, m, q, pl);
  endfunction

  task automatic check_rings();
    for (int i = 0; i < NS; i++)
      chk(int'(ring_count[i]) == ringm[i].size(),
          $sformatf("ring %0d holds %0d, expected %0d", i, ring_count[i], ringm[i].size()));
  endtask

  // Master in long wait: end it with a TNE from slave s.
  task automatic end_long(input int s, input mode_e m);
    send_rx(sf(s, FT_TNE, m, '0, zero_pl));
  endtask

  initial begin
    frame_t f, e;
    payload_t p;
    int gap, tag, n_ok, k;
    phy_tx_done = 0; phy_ob_rd_en = 0; phy_ob_rd_addr = '0;
    phy_ib_we = 0; phy_ib_addr = '0; phy_ib_wdata = '0; phy_rx_valid = 0;
    for (int i = 0; i < NEV; i++) evn[i] = 0;
    for (int i = 0; i < PAYLOAD_BYTES; i++) zero_pl[i] = 8'h00;
    tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    enable = 1;

    // ---------------- round 1, uplink slave 0 ----------------
    expect_tx("poll s0", 0, FT_POLL, MODE_UP, 0, zero_pl, gap);
    send_rx(sf(0, FT_RTS, MODE_UP, 0, zero_pl));
    expect_tx("cts s0", 0, FT_CTS, MODE_UP, 0, zero_pl, gap);
    for (int k = 0; k < 2; k++) begin
      p = mkpl(sa(2), tag++);
      send_rx(sf(0, FT_DATA, MODE_UP, seq_t'(k), p));
      ringm[2].push_back(p);
      expect_tx("ack s0", 0, FT_ACK, MODE_UP, seq_t'(k + 1), zero_pl, gap);
    end
    // our ACK "lost": the slave repeats frame 1
    send_rx(sf(0, FT_DATA, MODE_UP, 1, p));
    expect_tx("dup ack s0", 0, FT_ACK, MODE_UP, 2, zero_pl, gap);
    check_rings();
    // payload CRC broken: NAK, then the good frame
    p = mkpl(sa(2), tag++);
    f = sf(0, FT_DATA, MODE_UP, 2, p);
    f[40] ^= 8'h10;
    send_rx(f);
    expect_tx("nak s0", 0, FT_NAK, MODE_UP, 2, zero_pl, gap);
    send_rx(sf(0, FT_DATA, MODE_UP, 2, p));
    ringm[2].push_back(p);
    expect_tx("ack s0 #3", 0, FT_ACK, MODE_UP, 3, zero_pl, gap);
    // a frame for another device is ignored, a frame with a broken header
    // counts as an error, then a second error closes the connection
    send_rx(make_frame(sa(1), sa(2), FT_ACK, MODE_UP, 0, zero_pl));
    f = sf(0, FT_DATA, MODE_UP, 3, mkpl(sa(2), tag++));
    f[1] ^= 8'h04;
    send_rx(f);
    expect_tx("nak s0 #2", 0, FT_NAK, MODE_UP, 3, zero_pl, gap);
    f = sf(0, FT_DATA, MODE_UP, 3, mkpl(sa(2), tag++));
    f[63] ^= 8'h01;
    send_rx(f);
    expect_tx("err close s0", 0, FT_CNE_NAK, MODE_UP, 3, zero_pl, gap);
    check_rings();
    // long wait runs out on its own
    expect_tx("poll s1", 1, FT_POLL, MODE_UP, 0, zero_pl, gap);
    chk(gap >= LW && gap <= LW + 400, $sformatf("long wait and POLL took %0d cycles", gap));

    // ---------------- uplink slave 1: silent ----------------
    expect_tx("poll s1 again", 1, FT_POLL, MODE_UP, 0, zero_pl, gap);
    chk(gap >= HT && gap <= HT + 8, $sformatf("header timeout after %0d cycles", gap));
    expect_tx("timeout close s1", 1, FT_CNE_NAK, MODE_UP, 0, zero_pl, gap);
    end_long(1, MODE_UP);
    // the TNE ended the long wait: the next POLL comes well before LW
    // ---------------- uplink slave 2: full ring, bad route, wrong sender ----------------
    expect_tx("poll s2", 2, FT_POLL, MODE_UP, 0, zero_pl, gap);
    chk(gap < 400, $sformatf("TNE ended the long wait (%0d cycles)", gap));
    send_rx(sf(0, FT_RTS, MODE_UP, 0, zero_pl));            // not the polled slave
    expect_tx("poll s2 resent", 2, FT_POLL, MODE_UP, 0, zero_pl, gap);
    send_rx(sf(2, FT_RTS, MODE_UP, 0, zero_pl));
    expect_tx("cts s2", 2, FT_CTS, MODE_UP, 0, zero_pl, gap);
    p = mkpl(sa(2), tag++);
    send_rx(sf(2, FT_DATA, MODE_UP, 0, p));
    ringm[2].push_back(p);
    expect_tx("ack s2", 2, FT_ACK, MODE_UP, 1, zero_pl, gap);
    // ring 2 now holds RF-1 payloads: full
    check_rings();
    send_rx(sf(2, FT_DATA, MODE_UP, 1, mkpl(sa(2), tag++)));
    expect_tx("nak full", 2, FT_NAK, MODE_UP, 1, zero_pl, gap);
    p = mkpl(12'h0F0, tag++);
    send_rx(sf(2, FT_DATA, MODE_UP, 1, p));
    expect_tx("close bad route", 2, FT_CNE_NAK, MODE_UP, 1, zero_pl, gap);
    end_long(2, MODE_UP);
    check_rings();

    // ---------------- downlinks ----------------
    // slaves 0 and 1 have nothing stored: skipped; slave 2 gets its three
    expect_tx("poll down s2", 2, FT_POLL, MODE_DOWN, 0, zero_pl, gap);
    send_rx(sf(2, FT_CTS, MODE_DOWN, 0, zero_pl));
    expect_tx("data 0", 2, FT_DATA, MODE_DOWN, 0, ringm[2][0], gap);
    send_rx(sf(2, FT_ACK, MODE_DOWN, 1, zero_pl));
    void'(ringm[2].pop_front());
    expect_tx("data 1", 2, FT_DATA, MODE_DOWN, 1, ringm[2][0], gap);
    send_rx(sf(2, FT_NAK, MODE_DOWN, 1, zero_pl));
    expect_tx("data 1 resent", 2, FT_DATA, MODE_DOWN, 1, ringm[2][0], gap);
    chk(gap < 250, $sformatf("NAK answered by a resend without rebuilding (%0d cycles)", gap));
    send_rx(sf(2, FT_ACK, MODE_DOWN, 2, zero_pl));
    void'(ringm[2].pop_front());
    expect_tx("data 2", 2, FT_DATA, MODE_DOWN, 2, ringm[2][0], gap);
    // no answer: after the timeout the same frame again
    expect_tx("data 2 timeout", 2, FT_DATA, MODE_DOWN, 2, ringm[2][0], gap);
    chk(gap >= HT && gap <= HT + 8, $sformatf("ACK timeout after %0d cycles", gap));
    send_rx(sf(2, FT_ACK, MODE_DOWN, 3, zero_pl));
    void'(ringm[2].pop_front());
    expect_tx("data 3", 2, FT_DATA, MODE_DOWN, 3, ringm[2][0], gap);
    send_rx(sf(2, FT_ACK, MODE_DOWN, 4, zero_pl));
    void'(ringm[2].pop_front());
    expect_tx("cne_ack", 2, FT_CNE_ACK, MODE_DOWN, 4, zero_pl, gap);
    end_long(2, MODE_DOWN);
    check_rings();

    // ---------------- round 2: long uplink hits the connection time ----------------
    expect_tx("poll s0 r2", 0, FT_POLL, MODE_UP, 0, zero_pl, gap);
    send_rx(sf(0, FT_RTS, MODE_UP, 0, zero_pl));
    expect_tx("cts s0 r2", 0, FT_CTS, MODE_UP, 0, zero_pl, gap);
    n_ok = 0;
    for (int k = 0; k < 14; k++) begin
      p = mkpl(sa(k % 3), tag++);
      send_rx(sf(0, FT_DATA, MODE_UP, seq_t'(k), p));
      ringm[k % 3].push_back(p);
      get_tx(f, gap);
      if (f[3][7:4] == FT_CNE_ACK) begin
        e = make_frame(MASTER_ADDR, sa(0), FT_CNE_ACK, MODE_UP, seq_t'(k + 1), zero_pl);
        chk(f == e, "CNE_ACK after connection time");
        break;
      end
      e = make_frame(MASTER_ADDR, sa(0), FT_ACK, MODE_UP, seq_t'(k + 1), zero_pl);
      chk(f == e, $sformatf("ack %0d in long connection", k));
      n_ok++;
    end
    chk(n_ok >= 1 && n_ok < 12, $sformatf("connection time ended after %0d frames", n_ok + 1));
    end_long(0, MODE_UP);
    check_rings();
    // slaves 1 and 2 have nothing to send: their TNE is answered with
    // CNE_NAK and the next connection follows without a long wait
    for (int s = 1; s < NS; s++) begin
      expect_tx("poll r2", s, FT_POLL, MODE_UP, 0, zero_pl, gap);
      if (s == 2) chk(gap < 400, $sformatf("no long wait after a TNE (%0d cycles)", gap));
      send_rx(sf(s, FT_TNE, MODE_UP, 0, zero_pl));
      expect_tx("close after tne", s, FT_CNE_NAK, MODE_UP, 0, zero_pl, gap);
    end
    // downlinks deliver every ring in order
    for (int s = 0; s < NS; s++) begin
      k = 0;
      expect_tx("poll down r2", s, FT_POLL, MODE_DOWN, 0, zero_pl, gap);
      if (s == 0) chk(gap < 400, $sformatf("no long wait after a TNE (%0d cycles)", gap));
      send_rx(sf(s, FT_CTS, MODE_DOWN, 0, zero_pl));
      while (ringm[s].size() > 0) begin
        expect_tx("data r2", s, FT_DATA, MODE_DOWN, seq_t'(k), ringm[s][0], gap);
        send_rx(sf(s, FT_ACK, MODE_DOWN, seq_t'(k + 1), zero_pl));
        void'(ringm[s].pop_front());
        k++;
      end
      expect_tx("cne_ack r2", s, FT_CNE_ACK, MODE_DOWN, seq_t'(k), zero_pl, gap);
      end_long(s, MODE_DOWN);
    end
    check_rings();
    // next round starts with slave 0 uplink
    expect_tx("poll r3", 0, FT_POLL, MODE_UP, 0, zero_pl, gap);
    enable = 0;

    for (int i = 0; i < NEV; i++) begin
      $display("  %-13s %0d", evname[i], evn[i]);
      chk(evn[i] > 0, $sformatf("mechanism %s never happened", evname[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
