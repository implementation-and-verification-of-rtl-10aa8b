// tb_mac_slave: self-checking test of a slave device (mac_slave, and through
// it slave_ctrl, frame_tx, frame_rx and the two rings).
//
// The testbench plays the physical layer, the master and the network layer
// above the slave. Every frame the slave sends is read from its output memory
// and compared byte for byte with a frame assembled by the reference package.
// The script covers:
//   * a POLL for another slave ignored;
//   * uplink with an empty transmit ring: TNE, then back to listening on CNE;
//   * uplink with queued payloads: RTS, a frame from the wrong device
//     refused and RTS sent again, DATA frames taken from the ring in order,
//     NAK and a missing ACK (after HDR_TIMEOUT) both re-sending the same
//     frame, two errors in a row ending the connection with TNE, the close
//     wait running out after LONG_WAIT, the unacknowledged frame sent first in
//     the next connection, CNE_ACK retiring it, ACK of the last frame leading
//     to TNE;
//   * downlink: CTS, DATA stored and ACKed with the next number, a repeated
//     DATA frame re-ACKed and not stored, a bad payload CRC answered with NAK,
//     a full receive ring refusing a frame, a timeout before any data
//     re-sending the CTS;
//   * the network-layer side: payloads written and committed, counts, and the
//     received payloads read back and released.
// Every event output of the slave must fire. Timers are shortened.
module tb_mac_slave;
  import mac_pkg::*;
  import tb_mac_ref::*;

  localparam addr_t ME = 12'h002;
  localparam int    RF = 4;
  localparam int    HT = 300;
  localparam int    FT = 600;
  localparam int    LW = 1000;
  localparam int    AW = $clog2(RF * PAYLOAD_BYTES);
  localparam int    CW = $clog2(RF);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          phy_tx_req, phy_tx_done, phy_ob_rd_en, phy_ib_we, phy_rx_valid;
  logic [5:0]    phy_ob_rd_addr, phy_ib_addr;
  logic [7:0]    phy_ob_rd_data, phy_ib_wdata;
  logic          nl_tx_we, nl_tx_commit, nl_rx_rd_en, nl_rx_release;
  logic [AW-1:0] nl_tx_addr, nl_tx_base, nl_rx_addr, nl_rx_base;
  logic [7:0]    nl_tx_wdata, nl_rx_rdata;
  logic [CW-1:0] nl_tx_count, nl_rx_count;
  slave_ev_t     ev;

  mac_slave #(.MY_ADDR(ME), .RING_FRAMES(RF), .HDR_TIMEOUT(HT), .FULL_TIMEOUT(FT),
              .LONG_WAIT(LW)) dut (.*);

  localparam int NEV = $bits(slave_ev_t);
  int evn [NEV];
  string evname [NEV] = '{"polled", "resend", "timeout", "bad_frame", "err_close",
                          "data_stored", "duplicate", "overflow", "data_acked", "cne_rx",
                          "no_data", "close_wait"};
  always_ff @(posedge clk)
    for (int i = 0; i < NEV; i++) if (ev[NEV-1-i]) evn[i]++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  payload_t zero_pl;

  function automatic payload_t mkpl(input int tag);
    payload_t p;
    for (int i = 0; i < PAYLOAD_BYTES; i++) p[i] = 8'((tag * 53 + i * 7) ^ (i << 3));
    return p;
  endfunction

  task automatic get_tx(output frame_t f, output int gap);
    gap = 0;
    while (!phy_tx_req && gap < 50000) begin @(negedge clk); gap++; end
    if (!phy_tx_req) begin chk(0, "slave never sent"); return; end
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

  task automatic expect_tx(input string tag, input ftype_e t, input mode_e m, input seq_t q,
                           input payload_t pl, output int gap);
    frame_t f, e;
    bit same = 1;
    get_tx(f, gap);
    e = make_frame(ME, MASTER_ADDR, t, m, q, pl);
    for (int i = 0; i < FRAME_BYTES; i++) if (f[i] !== e[i]) same = 0;
    chk(same, $sformatf("%s: expected %s mode %0d seq %0d, got type %04b seq %0d",
                        tag, t.name(), m, q, f[3][7:4], {f[3][1:0], f[4][7:6]}));
  endtask

  task automatic no_tx(input int n, input string tag);
    bit quiet = 1;
    repeat (n) begin @(negedge clk); if (phy_tx_req) quiet = 0; end
    chk(quiet, tag);
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

  function automatic frame_t mf(input ftype_e t, input mode_e m, input seq_t q, input payload_t pl);
    return make_frame(MASTER_ADDR, ME, t, m, q, pl);
  endfunction

  task automatic nl_put(input payload_t p);
    for (int i = 0; i < PAYLOAD_BYTES; i++) begin
      nl_tx_we = 1; nl_tx_addr = nl_tx_base + AW'(i); nl_tx_wdata = p[i];
      @(negedge clk);
    end
    nl_tx_we = 0;
    nl_tx_commit = 1;
    @(negedge clk);
    nl_tx_commit = 0;
  endtask

  task automatic nl_get(output payload_t p);
    for (int i = 0; i < PAYLOAD_BYTES; i++) begin
      nl_rx_rd_en = 1; nl_rx_addr = nl_rx_base + AW'(i);
      @(negedge clk);
      p[i] = nl_rx_rdata;
    end
    nl_rx_rd_en = 0;
    nl_rx_release = 1;
    @(negedge clk);
    nl_rx_release = 0;
  endtask

  initial begin
    frame_t   f;
    payload_t up [4];
    payload_t dn [4];
    payload_t got;
    int gap;
    phy_tx_done = 0; phy_ob_rd_en = 0; phy_ob_rd_addr = '0;
    phy_ib_we = 0; phy_ib_addr = '0; phy_ib_wdata = '0; phy_rx_valid = 0;
    nl_tx_we = 0; nl_tx_addr = '0; nl_tx_wdata = '0; nl_tx_commit = 0;
    nl_rx_rd_en = 0; nl_rx_addr = '0; nl_rx_release = 0;
    for (int i = 0; i < NEV; i++) evn[i] = 0;
    for (int i = 0; i < PAYLOAD_BYTES; i++) zero_pl[i] = 8'h00;
    for (int i = 0; i < 4; i++) begin up[i] = mkpl(i); dn[i] = mkpl(10 + i); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // a POLL for another slave is not answered
    send_rx(make_frame(MASTER_ADDR, ME + 1, FT_POLL, MODE_UP, 0, zero_pl));
    no_tx(800, "POLL for another slave answered");

    // uplink, nothing queued: TNE, CNE brings the slave back at once
    send_rx(mf(FT_POLL, MODE_UP, 0, zero_pl));
    expect_tx("tne empty", FT_TNE, MODE_UP, 0, zero_pl, gap);
    send_rx(mf(FT_CNE_NAK, MODE_UP, 0, zero_pl));
    repeat (200) @(negedge clk);

    // uplink with three payloads queued
    for (int i = 0; i < 3; i++) nl_put(up[i]);
    chk(nl_tx_count == 3, $sformatf("tx count %0d", nl_tx_count));
    send_rx(mf(FT_POLL, MODE_UP, 0, zero_pl));
    expect_tx("rts", FT_RTS, MODE_UP, 0, zero_pl, gap);
    send_rx(make_frame(12'h005, ME, FT_CTS, MODE_UP, 0, zero_pl));   // not the master
    expect_tx("rts resent", FT_RTS, MODE_UP, 0, zero_pl, gap);
    send_rx(mf(FT_CTS, MODE_UP, 0, zero_pl));
    expect_tx("data 0", FT_DATA, MODE_UP, 0, up[0], gap);
    send_rx(mf(FT_NAK, MODE_UP, 0, zero_pl));
    expect_tx("data 0 after nak", FT_DATA, MODE_UP, 0, up[0], gap);
    send_rx(mf(FT_ACK, MODE_UP, 1, zero_pl));
    expect_tx("data 1", FT_DATA, MODE_UP, 1, up[1], gap);
    expect_tx("data 1 after timeout", FT_DATA, MODE_UP, 1, up[1], gap);
    chk(gap >= HT && gap <= HT + 8, $sformatf("ACK timeout after %0d cycles", gap));
    send_rx(mf(FT_ACK, MODE_UP, 2, zero_pl));
    expect_tx("data 2", FT_DATA, MODE_UP, 2, up[2], gap);
    chk(nl_tx_count == 1, "two frames retired");
    send_rx(mf(FT_ACK, MODE_UP, 2, zero_pl));                     // stale ACK
    expect_tx("data 2 after stale ack", FT_DATA, MODE_UP, 2, up[2], gap);
    f = mf(FT_ACK, MODE_UP, 3, zero_pl);
    f[5] ^= 8'h20;                                                 // broken header CRC
    send_rx(f);
    expect_tx("tne after two errors", FT_TNE, MODE_UP, 0, zero_pl, gap);
    // close wait runs out, then the slave listens again
    no_tx(LW + 20, "slave sent during the close wait");
    chk(nl_tx_count == 1, "unacknowledged frame kept");

    // next uplink: the kept frame goes first, CNE_ACK retires it
    send_rx(mf(FT_POLL, MODE_UP, 0, zero_pl));
    expect_tx("rts 2", FT_RTS, MODE_UP, 0, zero_pl, gap);
    send_rx(mf(FT_CTS, MODE_UP, 0, zero_pl));
    expect_tx("kept frame", FT_DATA, MODE_UP, 0, up[2], gap);
    send_rx(mf(FT_CNE_ACK, MODE_UP, 1, zero_pl));
    expect_tx("tne on cne", FT_TNE, MODE_UP, 0, zero_pl, gap);
    repeat (20) @(negedge clk);
    chk(nl_tx_count == 0, "CNE_ACK retired the frame");

    // uplink ending by itself: ACK of the last frame, then TNE
    nl_put(up[3]);
    send_rx(mf(FT_POLL, MODE_UP, 0, zero_pl));
    expect_tx("rts 3", FT_RTS, MODE_UP, 0, zero_pl, gap);
    send_rx(mf(FT_CTS, MODE_UP, 0, zero_pl));
    expect_tx("data 3", FT_DATA, MODE_UP, 0, up[3], gap);
    send_rx(mf(FT_ACK, MODE_UP, 1, zero_pl));
    expect_tx("tne ring empty", FT_TNE, MODE_UP, 0, zero_pl, gap);
    send_rx(mf(FT_CNE_NAK, MODE_UP, 1, zero_pl));
    repeat (200) @(negedge clk);

    // downlink
    send_rx(mf(FT_POLL, MODE_DOWN, 0, zero_pl));
    expect_tx("cts", FT_CTS, MODE_DOWN, 0, zero_pl, gap);
    send_rx(mf(FT_DATA, MODE_DOWN, 0, dn[0]));
    expect_tx("ack 1", FT_ACK, MODE_DOWN, 1, zero_pl, gap);
    send_rx(mf(FT_DATA, MODE_DOWN, 0, dn[0]));                    // repeated
    expect_tx("ack 1 again", FT_ACK, MODE_DOWN, 1, zero_pl, gap);
    f = mf(FT_DATA, MODE_DOWN, 1, dn[1]);
    f[30] ^= 8'h80;
    send_rx(f);
    expect_tx("nak 1", FT_NAK, MODE_DOWN, 1, zero_pl, gap);
    send_rx(mf(FT_DATA, MODE_DOWN, 1, dn[1]));
    expect_tx("ack 2", FT_ACK, MODE_DOWN, 2, zero_pl, gap);
    send_rx(mf(FT_DATA, MODE_DOWN, 2, dn[2]));
    expect_tx("ack 3", FT_ACK, MODE_DOWN, 3, zero_pl, gap);
    chk(nl_rx_count == 3, $sformatf("rx count %0d", nl_rx_count));
    // receive ring full
    send_rx(mf(FT_DATA, MODE_DOWN, 3, dn[3]));
    expect_tx("nak full", FT_NAK, MODE_DOWN, 3, zero_pl, gap);
    // no answer: second error, the slave ends the connection
    expect_tx("tne after timeout", FT_TNE, MODE_DOWN, 3, zero_pl, gap);
    chk(gap >= FT && gap <= FT + 300, $sformatf("data timeout after %0d cycles", gap));
    send_rx(mf(FT_CNE_NAK, MODE_DOWN, 3, zero_pl));
    for (int k = 0; k < 3; k++) begin
      nl_get(got);
      chk(got == dn[k], $sformatf("received payload %0d", k));
    end
    chk(nl_rx_count == 0, "receive ring released");

    // downlink, first DATA lost: CTS again, then a CNE_ACK closes
    send_rx(mf(FT_POLL, MODE_DOWN, 0, zero_pl));
    expect_tx("cts 2", FT_CTS, MODE_DOWN, 0, zero_pl, gap);
    expect_tx("cts after timeout", FT_CTS, MODE_DOWN, 0, zero_pl, gap);
    chk(gap >= FT && gap <= FT + 8, $sformatf("data timeout after %0d cycles", gap));
    send_rx(mf(FT_DATA, MODE_DOWN, 0, dn[3]));
    expect_tx("ack d3", FT_ACK, MODE_DOWN, 1, zero_pl, gap);
    send_rx(mf(FT_CNE_ACK, MODE_DOWN, 1, zero_pl));
    expect_tx("tne on cne_ack", FT_TNE, MODE_DOWN, 1, zero_pl, gap);
    nl_get(got);
    chk(got == dn[3], "received payload 3");

    for (int i = 0; i < NEV; i++) begin
      $display("  %-12s %0d", evname[i], evn[i]);
      chk(evn[i] > 0, $sformatf("mechanism %s never happened", evname[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
