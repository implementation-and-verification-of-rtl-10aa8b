// mac_master: the master device of the network (data link layer only).
//
// It joins the master control block with the standard transmitter and
// receiver and three kinds of memory:
//   * the output memory (64 bytes) the transmitter builds frames in and the
//     physical layer reads;
//   * the input memory (64 bytes) the physical layer writes received frames to
//     and the receiver reads;
//   * the store: one ring of RING_FRAMES payload slots (56 bytes each) per
//     slave, holding the data uploaded by any slave for that slave until the
//     downlink connection delivers it. The receiver writes it, the transmitter
//     reads it; the control block keeps the ring pointers and places the
//     transmitter's read address and the receiver's write address.
// The master has no network layer of its own: it only relays data between
// slaves, as in the protocol's test network.
//
// Physical-layer side: phy_tx_req is held while a frame waits in the output
// memory, the physical layer reads it through phy_ob_* (one cycle latency),
// writes incoming frames through phy_ib_* and pulses phy_rx_valid when one is
// complete.
module mac_master
  import mac_pkg::*;
#(
  parameter int unsigned N_SLAVES     = 3,
  parameter int unsigned RING_FRAMES  = 24,
  parameter int unsigned HDR_TIMEOUT  = 2048,
  parameter int unsigned FULL_TIMEOUT = 4096,
  parameter int unsigned CONN_TIME    = 40000,
  parameter int unsigned LONG_WAIT    = 2048,
  parameter int unsigned STORE_BYTES  = N_SLAVES * RING_FRAMES * PAYLOAD_BYTES,
  parameter int unsigned DAW          = $clog2(STORE_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        phy_tx_req,
  input  logic        phy_tx_done,
  input  logic        phy_ob_rd_en,
  input  logic [5:0]  phy_ob_rd_addr,
  output logic [7:0]  phy_ob_rd_data,
  input  logic        phy_ib_we,
  input  logic [5:0]  phy_ib_addr,
  input  logic [7:0]  phy_ib_wdata,
  input  logic        phy_rx_valid,
  output logic [N_SLAVES-1:0][$clog2(RING_FRAMES)-1:0] ring_count,
  output master_ev_t  ev
);

  logic           rx_start, rx_done, rx_hdr_ok, rx_is_data, rx_pl_ok;
  mac_hdr_t       rx_hdr;
  addr_t          rx_route;
  logic [DAW-1:0] rx_wr_base;
  logic           tx_start, tx_done;
  mac_hdr_t       tx_hdr;
  logic [DAW-1:0] tx_src_base;

  logic           ob_we;   logic [5:0] ob_addr;  logic [7:0] ob_wdata;
  logic           ib_rd_en; logic [5:0] ib_rd_addr; logic [7:0] ib_rd_data;
  logic           st_we;   logic [DAW-1:0] st_waddr; logic [7:0] st_wdata;
  logic           st_rd_en; logic [DAW-1:0] st_raddr; logic [7:0] st_rdata;

  master_ctrl #(
    .N_SLAVES(N_SLAVES), .RING_FRAMES(RING_FRAMES), .DAW(DAW),
    .HDR_TIMEOUT(HDR_TIMEOUT), .FULL_TIMEOUT(FULL_TIMEOUT),
    .CONN_TIME(CONN_TIME), .LONG_WAIT(LONG_WAIT)
  ) u_ctrl (
    .clk, .rst_n, .enable, .phy_rx_valid,
    .rx_start, .rx_done, .rx_hdr, .rx_hdr_ok, .rx_is_data, .rx_pl_ok, .rx_route, .rx_wr_base,
    .tx_start, .tx_hdr, .tx_src_base, .tx_done,
    .phy_tx_req, .phy_tx_done, .ring_count, .ev);

  frame_tx #(.DAW(DAW)) u_tx (
    .clk, .rst_n, .start(tx_start), .hdr(tx_hdr), .src_base(tx_src_base),
    .src_rd_en(st_rd_en), .src_rd_addr(st_raddr), .src_rd_data(st_rdata),
    .ob_we, .ob_addr, .ob_wdata, .busy(), .done(tx_done));

  frame_rx #(.DAW(DAW)) u_rx (
    .clk, .rst_n, .start(rx_start), .my_addr(MASTER_ADDR),
    .ib_rd_en, .ib_rd_addr, .ib_rd_data,
    .hdr(rx_hdr), .hdr_ok(rx_hdr_ok), .is_data(rx_is_data), .pl_ok(rx_pl_ok),
    .route(rx_route), .wr_base(rx_wr_base),
    .dst_we(st_we), .dst_addr(st_waddr), .dst_wdata(st_wdata), .busy(), .done(rx_done));

  byte_ram #(.DEPTH(FRAME_BYTES)) u_obuf (
    .clk, .we(ob_we), .waddr(ob_addr), .wdata(ob_wdata),
    .rd_en(phy_ob_rd_en), .raddr(phy_ob_rd_addr), .rdata(phy_ob_rd_data));

  byte_ram #(.DEPTH(FRAME_BYTES)) u_ibuf (
    .clk, .we(phy_ib_we), .waddr(phy_ib_addr), .wdata(phy_ib_wdata),
    .rd_en(ib_rd_en), .raddr(ib_rd_addr), .rdata(ib_rd_data));

  byte_ram #(.DEPTH(STORE_BYTES), .AW(DAW)) u_store (
    .clk, .we(st_we), .waddr(st_waddr), .wdata(st_wdata),
    .rd_en(st_rd_en), .raddr(st_raddr), .rdata(st_rdata));

endmodule
