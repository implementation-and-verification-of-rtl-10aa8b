// mac_slave: a slave device of the network.
//
// It joins the slave control block with the same transmitter and receiver the
// master uses, its 64-byte output and input memories, and two ring memories
// that connect the data link layer with the network layer above it:
//   * the transmit ring: the network layer writes 56-byte payloads (the first
//     two bytes carry the 12-bit final destination address) and commits them;
//     the transmitter reads them for uplink DATA frames;
//   * the receive ring: the receiver writes the payloads of downlink DATA
//     frames; the network layer reads them and releases each slot.
// Both rings hold RING_FRAMES slots of 56 bytes, one of which is always kept
// free. The control block owns the ring pointers; it gives the network layer
// the address of the next free transmit slot (nl_tx_base) and of the oldest
// received payload (nl_rx_base).
//
// Physical-layer side: as in mac_master.
module mac_slave
  import mac_pkg::*;
#(
  parameter addr_t       MY_ADDR      = 12'h001,
  parameter int unsigned RING_FRAMES  = 24,
  parameter int unsigned HDR_TIMEOUT  = 2048,
  parameter int unsigned FULL_TIMEOUT = 4096,
  parameter int unsigned LONG_WAIT    = 2048,
  parameter int unsigned RING_BYTES   = RING_FRAMES * PAYLOAD_BYTES,
  parameter int unsigned DAW          = $clog2(RING_BYTES)
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           phy_tx_req,
  input  logic           phy_tx_done,
  input  logic           phy_ob_rd_en,
  input  logic [5:0]     phy_ob_rd_addr,
  output logic [7:0]     phy_ob_rd_data,
  input  logic           phy_ib_we,
  input  logic [5:0]     phy_ib_addr,
  input  logic [7:0]     phy_ib_wdata,
  input  logic           phy_rx_valid,
  // network layer
  input  logic           nl_tx_we,
  input  logic [DAW-1:0] nl_tx_addr,
  input  logic [7:0]     nl_tx_wdata,
  input  logic           nl_tx_commit,
  output logic [DAW-1:0] nl_tx_base,
  output logic [$clog2(RING_FRAMES)-1:0] nl_tx_count,
  input  logic           nl_rx_rd_en,
  input  logic [DAW-1:0] nl_rx_addr,
  output logic [7:0]     nl_rx_rdata,
  input  logic           nl_rx_release,
  output logic [DAW-1:0] nl_rx_base,
  output logic [$clog2(RING_FRAMES)-1:0] nl_rx_count,
  output slave_ev_t      ev
);

  logic           rx_start, rx_done, rx_hdr_ok, rx_is_data, rx_pl_ok;
  mac_hdr_t       rx_hdr;
  logic [DAW-1:0] rx_wr_base;
  logic           tx_start, tx_done;
  mac_hdr_t       tx_hdr;
  logic [DAW-1:0] tx_src_base;

  logic           ob_we;    logic [5:0] ob_addr;    logic [7:0] ob_wdata;
  logic           ib_rd_en; logic [5:0] ib_rd_addr; logic [7:0] ib_rd_data;
  logic           rq_we;    logic [DAW-1:0] rq_waddr; logic [7:0] rq_wdata;
  logic           tq_rd_en; logic [DAW-1:0] tq_raddr; logic [7:0] tq_rdata;

  slave_ctrl #(
    .MY_ADDR(MY_ADDR), .RING_FRAMES(RING_FRAMES), .DAW(DAW),
    .HDR_TIMEOUT(HDR_TIMEOUT), .FULL_TIMEOUT(FULL_TIMEOUT), .LONG_WAIT(LONG_WAIT)
  ) u_ctrl (
    .clk, .rst_n, .phy_rx_valid,
    .rx_start, .rx_done, .rx_hdr, .rx_hdr_ok, .rx_is_data, .rx_pl_ok, .rx_wr_base,
    .tx_start, .tx_hdr, .tx_src_base, .tx_done,
    .phy_tx_req, .phy_tx_done,
    .nl_tx_commit, .nl_tx_base, .nl_tx_count, .nl_rx_release, .nl_rx_base, .nl_rx_count,
    .ev);

  frame_tx #(.DAW(DAW)) u_tx (
    .clk, .rst_n, .start(tx_start), .hdr(tx_hdr), .src_base(tx_src_base),
    .src_rd_en(tq_rd_en), .src_rd_addr(tq_raddr), .src_rd_data(tq_rdata),
    .ob_we, .ob_addr, .ob_wdata, .busy(), .done(tx_done));

  frame_rx #(.DAW(DAW)) u_rx (
    .clk, .rst_n, .start(rx_start), .my_addr(MY_ADDR),
    .ib_rd_en, .ib_rd_addr, .ib_rd_data,
    .hdr(rx_hdr), .hdr_ok(rx_hdr_ok), .is_data(rx_is_data), .pl_ok(rx_pl_ok),
    .route(), .wr_base(rx_wr_base),
    .dst_we(rq_we), .dst_addr(rq_waddr), .dst_wdata(rq_wdata), .busy(), .done(rx_done));

  byte_ram #(.DEPTH(FRAME_BYTES)) u_obuf (
    .clk, .we(ob_we), .waddr(ob_addr), .wdata(ob_wdata),
    .rd_en(phy_ob_rd_en), .raddr(phy_ob_rd_addr), .rdata(phy_ob_rd_data));

  byte_ram #(.DEPTH(FRAME_BYTES)) u_ibuf (
    .clk, .we(phy_ib_we), .waddr(phy_ib_addr), .wdata(phy_ib_wdata),
    .rd_en(ib_rd_en), .raddr(ib_rd_addr), .rdata(ib_rd_data));

  byte_ram #(.DEPTH(RING_BYTES), .AW(DAW)) u_txq (
    .clk, .we(nl_tx_we), .waddr(nl_tx_addr), .wdata(nl_tx_wdata),
    .rd_en(tq_rd_en), .raddr(tq_raddr), .rdata(tq_rdata));

  byte_ram #(.DEPTH(RING_BYTES), .AW(DAW)) u_rxq (
    .clk, .we(rq_we), .waddr(rq_waddr), .wdata(rq_wdata),
    .rd_en(nl_rx_rd_en), .raddr(nl_rx_addr), .rdata(nl_rx_rdata));

endmodule
