// plc_network: one master and N_SLAVES slaves on a shared physical layer.
//
// This is the complete polling network: the master (device 0) polls every
// slave for uplink data, stores each uploaded payload in the ring of the slave
// named in its first two bytes, and then delivers the stored data in downlink
// connections. The physical layer copies each frame from the sender's output
// memory into the input memory of every other device; each device decides
// from the header whether the frame is for it.
//
// Slave i has address 0x001 + i; the master has address 0x000. Each slave's
// network-layer interface (transmit ring writes and commits, receive ring
// reads and releases, ring counts) is brought out as an array indexed by
// slave. The physical layer's error-injection inputs are brought out for
// testing; tie them low in normal use. The default of three slaves is the
// network the protocol was demonstrated on.
//
// Beside the network, and not connected to it, stands the two-device
// frame-path test set-up (arq_pair) that the protocol's bring-up used before
// the control blocks existed; its push button and two LEDs are brought out
// as arq_button, arq_led_a (ACK received) and arq_led_b (NAK received).
//
// A result checker sits in front of the slaves' network-layer ports. A push on
// test_button hands those ports to it: it loads payloads into every slave for
// every other slave and lets the master run, with the external `enable` ignored
// while it does so. It then reads back what arrived and lights test_led_a if
// everything arrived intact, or test_led_b if not. Until that push, the
// network-layer ports and `enable` belong to the outside. The ports stay with
// the checker until reset.
module plc_network
  import mac_pkg::*;
#(
  parameter int unsigned N_SLAVES     = 3,
  parameter int unsigned RING_FRAMES  = 24,
  parameter int unsigned HDR_TIMEOUT  = 2048,
  parameter int unsigned FULL_TIMEOUT = 4096,
  parameter int unsigned CONN_TIME    = 40000,
  parameter int unsigned LONG_WAIT    = 2048,
  parameter int unsigned SDAW         = $clog2(RING_FRAMES * PAYLOAD_BYTES),
  parameter int unsigned PW           = $clog2(RING_FRAMES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable,
  // physical-layer error injection (test only)
  input  logic                          inj_drop,
  input  logic                          inj_flip,
  input  logic [5:0]                    inj_byte,
  // network layer of each slave
  input  logic [N_SLAVES-1:0]           nl_tx_we,
  input  logic [N_SLAVES-1:0][SDAW-1:0] nl_tx_addr,
  input  logic [N_SLAVES-1:0][7:0]      nl_tx_wdata,
  input  logic [N_SLAVES-1:0]           nl_tx_commit,
  output logic [N_SLAVES-1:0][SDAW-1:0] nl_tx_base,
  output logic [N_SLAVES-1:0][PW-1:0]   nl_tx_count,
  input  logic [N_SLAVES-1:0]           nl_rx_rd_en,
  input  logic [N_SLAVES-1:0][SDAW-1:0] nl_rx_addr,
  output logic [N_SLAVES-1:0][7:0]      nl_rx_rdata,
  input  logic [N_SLAVES-1:0]           nl_rx_release,
  output logic [N_SLAVES-1:0][SDAW-1:0] nl_rx_base,
  output logic [N_SLAVES-1:0][PW-1:0]   nl_rx_count,
  // status
  output logic [N_SLAVES-1:0][PW-1:0]   master_ring_count,
  output master_ev_t                    master_ev,
  output slave_ev_t [N_SLAVES-1:0]      slave_ev,
  output logic                          phy_busy,
  input  logic                          arq_button,
  output logic                          arq_led_a,
  output logic                          arq_led_b,
  output logic                          arq_busy,
  input  logic                          test_button,
  output logic                          test_led_a,
  output logic                          test_led_b
);

  localparam int unsigned N_DEV = N_SLAVES + 1;

  logic [N_DEV-1:0]      tx_req, tx_done, ib_we, rx_valid;
  logic                  ob_rd_en;
  logic [5:0]            ob_rd_addr, ib_addr;
  logic [7:0]            ib_wdata;
  logic [N_DEV-1:0][7:0] ob_rd_data;

  // Network-layer ports as seen by the slaves: from outside, or from the checker.
  logic                          ck_active, ck_run, m_enable;
  logic [N_SLAVES-1:0]           ck_tx_we, ck_tx_commit, ck_rx_rd_en, ck_rx_release;
  logic [N_SLAVES-1:0][SDAW-1:0] ck_tx_addr, ck_rx_addr;
  logic [N_SLAVES-1:0][7:0]      ck_tx_wdata;
  logic [N_SLAVES-1:0]           s_tx_we, s_tx_commit, s_rx_rd_en, s_rx_release;
  logic [N_SLAVES-1:0][SDAW-1:0] s_tx_addr, s_rx_addr;
  logic [N_SLAVES-1:0][7:0]      s_tx_wdata;

  result_checker #(.N_SLAVES(N_SLAVES), .RING_FRAMES(RING_FRAMES)) u_check (
    .clk, .rst_n, .button(test_button), .active(ck_active), .run(ck_run),
    .led_a(test_led_a), .led_b(test_led_b),
    .nl_tx_we(ck_tx_we), .nl_tx_addr(ck_tx_addr), .nl_tx_wdata(ck_tx_wdata),
    .nl_tx_commit(ck_tx_commit), .nl_tx_base,
    .nl_rx_rd_en(ck_rx_rd_en), .nl_rx_addr(ck_rx_addr), .nl_rx_rdata,
    .nl_rx_release(ck_rx_release), .nl_rx_base, .nl_rx_count);

  assign m_enable     = ck_active ? ck_run : enable;
  assign s_tx_we      = ck_active ? ck_tx_we      : nl_tx_we;
  assign s_tx_addr    = ck_active ? ck_tx_addr    : nl_tx_addr;
  assign s_tx_wdata   = ck_active ? ck_tx_wdata   : nl_tx_wdata;
  assign s_tx_commit  = ck_active ? ck_tx_commit  : nl_tx_commit;
  assign s_rx_rd_en   = ck_active ? ck_rx_rd_en   : nl_rx_rd_en;
  assign s_rx_addr    = ck_active ? ck_rx_addr    : nl_rx_addr;
  assign s_rx_release = ck_active ? ck_rx_release : nl_rx_release;

  phy_bus #(.N_DEV(N_DEV)) u_phy (
    .clk, .rst_n, .tx_req, .tx_done, .ob_rd_en, .ob_rd_addr, .ob_rd_data,
    .ib_we, .ib_addr, .ib_wdata, .rx_valid,
    .inj_drop, .inj_flip, .inj_byte, .busy(phy_busy));

  mac_master #(
    .N_SLAVES(N_SLAVES), .RING_FRAMES(RING_FRAMES), .HDR_TIMEOUT(HDR_TIMEOUT),
    .FULL_TIMEOUT(FULL_TIMEOUT), .CONN_TIME(CONN_TIME), .LONG_WAIT(LONG_WAIT)
  ) u_master (
    .clk, .rst_n, .enable(m_enable),
    .phy_tx_req(tx_req[0]), .phy_tx_done(tx_done[0]),
    .phy_ob_rd_en(ob_rd_en), .phy_ob_rd_addr(ob_rd_addr), .phy_ob_rd_data(ob_rd_data[0]),
    .phy_ib_we(ib_we[0]), .phy_ib_addr(ib_addr), .phy_ib_wdata(ib_wdata),
    .phy_rx_valid(rx_valid[0]),
    .ring_count(master_ring_count), .ev(master_ev));

  for (genvar i = 0; i < N_SLAVES; i++) begin : g_slave
    mac_slave #(
      .MY_ADDR(SLAVE_BASE_ADDR + addr_t'(i)), .RING_FRAMES(RING_FRAMES),
      .HDR_TIMEOUT(HDR_TIMEOUT), .FULL_TIMEOUT(FULL_TIMEOUT), .LONG_WAIT(LONG_WAIT)
    ) u_slave (
      .clk, .rst_n,
      .phy_tx_req(tx_req[i+1]), .phy_tx_done(tx_done[i+1]),
      .phy_ob_rd_en(ob_rd_en), .phy_ob_rd_addr(ob_rd_addr), .phy_ob_rd_data(ob_rd_data[i+1]),
      .phy_ib_we(ib_we[i+1]), .phy_ib_addr(ib_addr), .phy_ib_wdata(ib_wdata),
      .phy_rx_valid(rx_valid[i+1]),
      .nl_tx_we(s_tx_we[i]), .nl_tx_addr(s_tx_addr[i]), .nl_tx_wdata(s_tx_wdata[i]),
      .nl_tx_commit(s_tx_commit[i]), .nl_tx_base(nl_tx_base[i]), .nl_tx_count(nl_tx_count[i]),
      .nl_rx_rd_en(s_rx_rd_en[i]), .nl_rx_addr(s_rx_addr[i]), .nl_rx_rdata(nl_rx_rdata[i]),
      .nl_rx_release(s_rx_release[i]), .nl_rx_base(nl_rx_base[i]), .nl_rx_count(nl_rx_count[i]),
      .ev(slave_ev[i]));
  end

  arq_pair u_arq (
    .clk, .rst_n, .button(arq_button), .led_a(arq_led_a), .led_b(arq_led_b), .busy(arq_busy));

endmodule
