// arq_pair: the two-device set-up that tests the frame path on its own.
//
// Device A and device B each have the standard transmitter and receiver with
// their 64-byte output and input memories, but no master or slave control
// block; the simple physical layer links them. A push of the button makes
// device A build a header-only frame with random address, type, mode and
// sequence fields and send it to B. B checks only the header CRC and answers
// with an ACK frame when it is right and a NAK frame when it is wrong. A
// checks the answer and lights led_a for an ACK or led_b for a NAK.
// The first push after reset sends a frame whose CRC field is random too
// (not calculated), so B must answer NAK (a random 14-bit CRC is right with
// probability 2^-14); every later push sends a frame with the CRC
// calculated, which B must answer with ACK. If the answer is neither (a
// broken frame), no LED lights.
//
// What follows the protocol's test description: two devices without a
// control block, header-only frames with random fields, the first frame's
// CRC left uncalculated, B checking nothing but the CRC, ACK/NAK answers and
// the two LEDs. This design's own choices: the two small sequencers that
// stand in for the missing control blocks, a 64-bit LFSR as the random
// source (free-running from reset), the button synchronised and
// edge-detected (not debounced), the device addresses, and the LEDs holding
// their state until the next push (which clears them).
//
// Interface: button is a level from a push button; led_a, led_b are levels;
// busy is high from a push until A has checked the answer.
// Timing: from the push to the LED about 1080 cycles (each direction: build,
// 66-cycle copy, CRC check of the received header).
module arq_pair
  import mac_pkg::*;
#(
  parameter addr_t ADDR_A = 12'h001,
  parameter addr_t ADDR_B = 12'h002
) (
  input  logic clk,
  input  logic rst_n,
  input  logic button,
  output logic led_a,
  output logic led_b,
  output logic busy
);

  // ---------------------------------------------------------------- button
  logic [2:0] btn_q;
  logic       press;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) btn_q <= '0;
    else        btn_q <= {btn_q[1:0], button};
  end
  assign press = btn_q[1] && !btn_q[2];

  // ---------------------------------------------------------------- random bits
  // x^64 + x^63 + x^61 + x^60 + 1, Fibonacci form, shifted every cycle
  logic [63:0] lfsr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_q <= 64'h9E37_79B9_7F4A_7C15;
    else        lfsr_q <= {lfsr_q[62:0], lfsr_q[63] ^ lfsr_q[62] ^ lfsr_q[60] ^ lfsr_q[59]};
  end

  // ---------------------------------------------------------------- physical layer
  logic [1:0]      tx_req, tx_done, ib_we, rx_valid;
  logic            ob_rd_en;
  logic [5:0]      ob_rd_addr, ib_addr;
  logic [7:0]      ib_wdata;
  logic [1:0][7:0] ob_rd_data;

  phy_bus #(.N_DEV(2)) u_link (
    .clk, .rst_n, .tx_req, .tx_done, .ob_rd_en, .ob_rd_addr, .ob_rd_data,
    .ib_we, .ib_addr, .ib_wdata, .rx_valid,
    .inj_drop(1'b0), .inj_flip(1'b0), .inj_byte(6'd0), .busy());

  // ---------------------------------------------------------------- device A
  typedef enum logic [2:0] {A_IDLE, A_BUILD, A_SPOIL_HI, A_SPOIL_LO, A_SEND, A_WAIT} a_state_e;
  a_state_e  a_state;
  logic      first_q;
  logic      a_answer;
  logic      a_tx_start, a_tx_done, a_rx_done, a_hdr_ok;
  mac_hdr_t  a_hdr_q, a_rx_hdr;
  logic      a_txw;  logic [5:0] a_txa;  logic [7:0] a_txd;
  logic      a_obw;  logic [5:0] a_oba;  logic [7:0] a_obd;
  logic      a_ib_rd_en; logic [5:0] a_ib_rd_addr; logic [7:0] a_ib_rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_state    <= A_IDLE;
      first_q    <= 1'b1;
      a_tx_start <= 1'b0;
      a_hdr_q    <= '0;
      led_a      <= 1'b0;
      led_b      <= 1'b0;
    end else begin
      a_tx_start <= 1'b0;
      if (press && (a_state == A_IDLE || a_state == A_WAIT)) begin
        led_a      <= 1'b0;
        led_b      <= 1'b0;
        a_hdr_q    <= mac_hdr_t'(lfsr_q[33:0]);
        a_tx_start <= 1'b1;
        a_state    <= A_BUILD;
      end else begin
        unique case (a_state)
          A_IDLE: ;
          A_BUILD: if (a_tx_done) a_state <= first_q ? A_SPOIL_HI : A_SEND;
          A_SPOIL_HI: a_state <= A_SPOIL_LO;
          A_SPOIL_LO: begin
            first_q <= 1'b0;
            a_state <= A_SEND;
          end
          A_SEND: if (tx_done[0]) a_state <= A_WAIT;
          A_WAIT: if (a_rx_done) begin
            a_state <= A_IDLE;
            if (a_answer && a_rx_hdr.ftype == FT_ACK) led_a <= 1'b1;
            if (a_answer && a_rx_hdr.ftype == FT_NAK) led_b <= 1'b1;
          end
          default: a_state <= A_IDLE;
        endcase
      end
    end
  end

  // The first frame's CRC field (low 6 bits of byte 4, byte 5) is overwritten
  // with random bits; the two sequence-id bits in byte 4 are kept.
  always_comb begin
    a_obw = a_txw; a_oba = a_txa; a_obd = a_txd;
    if (a_state == A_SPOIL_HI) begin
      a_obw = 1'b1; a_oba = 6'd4; a_obd = {a_hdr_q.seq[1:0], lfsr_q[45:40]};
    end else if (a_state == A_SPOIL_LO) begin
      a_obw = 1'b1; a_oba = 6'd5; a_obd = lfsr_q[55:48];
    end
  end

  // an answer counts when its header CRC is right and it comes from B to A
  assign a_answer  = a_hdr_ok && (a_rx_hdr.src == ADDR_B) && (a_rx_hdr.dst == ADDR_A);
  assign tx_req[0] = (a_state == A_SEND);
  assign busy      = (a_state != A_IDLE);

  frame_tx #(.DAW(6)) u_a_tx (
    .clk, .rst_n, .start(a_tx_start), .hdr(a_hdr_q), .src_base(6'd0),
    .src_rd_en(), .src_rd_addr(), .src_rd_data(8'h00),
    .ob_we(a_txw), .ob_addr(a_txa), .ob_wdata(a_txd), .busy(), .done(a_tx_done));

  byte_ram #(.DEPTH(FRAME_BYTES)) u_a_obuf (
    .clk, .we(a_obw), .waddr(a_oba), .wdata(a_obd),
    .rd_en(ob_rd_en), .raddr(ob_rd_addr), .rdata(ob_rd_data[0]));

  byte_ram #(.DEPTH(FRAME_BYTES)) u_a_ibuf (
    .clk, .we(ib_we[0]), .waddr(ib_addr), .wdata(ib_wdata),
    .rd_en(a_ib_rd_en), .raddr(a_ib_rd_addr), .rdata(a_ib_rd_data));

  frame_rx #(.DAW(6)) u_a_rx (
    .clk, .rst_n, .start(rx_valid[0]), .my_addr(ADDR_A),
    .ib_rd_en(a_ib_rd_en), .ib_rd_addr(a_ib_rd_addr), .ib_rd_data(a_ib_rd_data),
    .hdr(a_rx_hdr), .hdr_ok(a_hdr_ok), .is_data(), .pl_ok(), .route(), .wr_base(6'd0),
    .dst_we(), .dst_addr(), .dst_wdata(), .busy(), .done(a_rx_done));

  // ---------------------------------------------------------------- device B
  typedef enum logic [1:0] {B_IDLE, B_CHECK, B_BUILD, B_SEND} b_state_e;
  b_state_e  b_state;
  logic      b_tx_start, b_tx_done, b_rx_done, b_hdr_ok;
  mac_hdr_t  b_hdr_q, b_rx_hdr;
  logic      b_obw;  logic [5:0] b_oba;  logic [7:0] b_obd;
  logic      b_ib_rd_en; logic [5:0] b_ib_rd_addr; logic [7:0] b_ib_rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_state    <= B_IDLE;
      b_tx_start <= 1'b0;
      b_hdr_q    <= '0;
    end else begin
      b_tx_start <= 1'b0;
      unique case (b_state)
        B_IDLE:  if (rx_valid[1]) b_state <= B_CHECK;
        B_CHECK: if (b_rx_done) begin
          b_hdr_q    <= '{src: ADDR_B, dst: ADDR_A, ftype: b_hdr_ok ? FT_ACK : FT_NAK,
                          mode: MODE_UP, seq: '0};
          b_tx_start <= 1'b1;
          b_state    <= B_BUILD;
        end
        B_BUILD: if (b_tx_done) b_state <= B_SEND;
        B_SEND:  if (tx_done[1]) b_state <= B_IDLE;
        default: b_state <= B_IDLE;
      endcase
    end
  end

  assign tx_req[1] = (b_state == B_SEND);

  byte_ram #(.DEPTH(FRAME_BYTES)) u_b_ibuf (
    .clk, .we(ib_we[1]), .waddr(ib_addr), .wdata(ib_wdata),
    .rd_en(b_ib_rd_en), .raddr(b_ib_rd_addr), .rdata(b_ib_rd_data));

  frame_rx #(.DAW(6)) u_b_rx (
    .clk, .rst_n, .start(rx_valid[1]), .my_addr(ADDR_B),
    .ib_rd_en(b_ib_rd_en), .ib_rd_addr(b_ib_rd_addr), .ib_rd_data(b_ib_rd_data),
    .hdr(b_rx_hdr), .hdr_ok(b_hdr_ok), .is_data(), .pl_ok(), .route(), .wr_base(6'd0),
    .dst_we(), .dst_addr(), .dst_wdata(), .busy(), .done(b_rx_done));

  frame_tx #(.DAW(6)) u_b_tx (
    .clk, .rst_n, .start(b_tx_start), .hdr(b_hdr_q), .src_base(6'd0),
    .src_rd_en(), .src_rd_addr(), .src_rd_data(8'h00),
    .ob_we(b_obw), .ob_addr(b_oba), .ob_wdata(b_obd), .busy(), .done(b_tx_done));

  byte_ram #(.DEPTH(FRAME_BYTES)) u_b_obuf (
    .clk, .we(b_obw), .waddr(b_oba), .wdata(b_obd),
    .rd_en(ob_rd_en), .raddr(ob_rd_addr), .rdata(ob_rd_data[1]));

endmodule
