// slave_ctrl: control block of a slave.
//
// The slave listens to every frame and waits until a POLL for its own address
// arrives; the POLL's mode decides the connection:
//   * downlink: answer CTS, then per DATA frame store the payload in the
//     receive ring (towards the network layer) and answer ACK. A wrong frame or
//     a timeout is answered with the CTS again if nothing was received yet, with
//     a NAK otherwise. A CNE from the master is answered with TNE.
//   * uplink: with frames queued, answer RTS and wait for CTS (a wrong frame or
//     timeout sends the RTS again); then send DATA frames from the transmit
//     ring. An ACK leads to "increment data" (the frame leaves the ring) and the
//     next DATA frame, or a TNE when the ring is empty. NAK, a wrong frame or a
//     timeout send the same DATA frame again. A CNE_ACK also retires the
//     outstanding frame, a CNE_NAK does not; both are answered with TNE.
//     With nothing queued, the answer to the POLL is TNE.
// Two consecutive errors end the connection with TNE. When the slave itself
// ends the connection it waits ("close wait") for the master's CNE, or
// LONG_WAIT cycles, before listening for POLLs again; after a CNE it returns
// at once.
//
// States, reactions and the two error mechanisms follow the protocol
// description. Sequence ids, ring handling and timer lengths are the same
// choices as in the master: DATA frames numbered from 0 per connection,
// ACK/NAK carrying the next expected number, one ring slot kept free.
//
// Network-layer side: the network layer writes a 56-byte frame at
// nl_tx_base and pulses nl_tx_commit; it reads the oldest received frame at
// nl_rx_base and pulses nl_rx_release. Counts of queued frames are outputs.
module slave_ctrl
  import mac_pkg::*;
#(
  parameter addr_t       MY_ADDR      = 12'h001,
  parameter int unsigned RING_FRAMES  = 24,
  parameter int unsigned DAW          = 11,
  parameter int unsigned HDR_TIMEOUT  = 2048,
  parameter int unsigned FULL_TIMEOUT = 4096,
  parameter int unsigned LONG_WAIT    = 2048
) (
  input  logic            clk,
  input  logic            rst_n,
  // receiver
  input  logic            phy_rx_valid,
  output logic            rx_start,
  input  logic            rx_done,
  input  mac_hdr_t        rx_hdr,
  input  logic            rx_hdr_ok,
  input  logic            rx_is_data,
  input  logic            rx_pl_ok,
  output logic [DAW-1:0]  rx_wr_base,
  // transmitter
  output logic            tx_start,
  output mac_hdr_t        tx_hdr,
  output logic [DAW-1:0]  tx_src_base,
  input  logic            tx_done,
  // physical layer
  output logic            phy_tx_req,
  input  logic            phy_tx_done,
  // network layer
  input  logic            nl_tx_commit,
  output logic [DAW-1:0]  nl_tx_base,
  output logic [$clog2(RING_FRAMES)-1:0] nl_tx_count,
  input  logic            nl_rx_release,
  output logic [DAW-1:0]  nl_rx_base,
  output logic [$clog2(RING_FRAMES)-1:0] nl_rx_count,
  output slave_ev_t       ev
);

  localparam int unsigned PW = $clog2(RING_FRAMES);

  typedef enum logic [3:0] {
    S_WAITING, S_BUILD, S_XMIT, S_WAIT_DATA, S_WAIT_CTS, S_WAIT_ACKNAK, S_INC, S_CLOSE
  } state_e;

  state_e        state, ret_q;
  addr_t         master_q;
  mode_e         mode_q;
  logic [1:0]    err_q;
  logic          got_data_q;
  seq_t          rx_exp_q;
  seq_t          tx_seq_q;
  logic [19:0]   wtmr_q;
  logic          rx_pend_q;
  logic [PW-1:0] txw_q, txr_q, rxw_q, rxr_q;
  mac_hdr_t      txh_q;
  logic          txs_q;

  function automatic logic [PW-1:0] inc_ptr(input logic [PW-1:0] p);
    return (32'(p) == RING_FRAMES - 1) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [PW-1:0] count(input logic [PW-1:0] w, input logic [PW-1:0] r);
    return (w >= r) ? PW'(w - r) : PW'(32'(w) + RING_FRAMES - 32'(r));
  endfunction

  function automatic logic [DAW-1:0] slot_addr(input logic [PW-1:0] p);
    return DAW'(32'(p) * PAYLOAD_BYTES);
  endfunction

  assign tx_src_base = slot_addr(txr_q);
  assign rx_wr_base  = slot_addr(rxw_q);
  assign nl_tx_base  = slot_addr(txw_q);
  assign nl_rx_base  = slot_addr(rxr_q);
  assign nl_tx_count = count(txw_q, txr_q);
  assign nl_rx_count = count(rxw_q, rxr_q);

  logic rx_mine, rx_good, wait_st, tmo, is_cne;
  always_comb begin
    rx_mine = rx_hdr_ok && (rx_hdr.dst == MY_ADDR);
    rx_good = rx_mine && (rx_hdr.src == master_q) && (rx_hdr.mode == mode_q) &&
              (!rx_is_data || rx_pl_ok);
    is_cne  = (rx_hdr.ftype == FT_CNE_ACK) || (rx_hdr.ftype == FT_CNE_NAK);
    wait_st = (state == S_WAIT_DATA) || (state == S_WAIT_CTS) || (state == S_WAIT_ACKNAK);
    tmo     = wait_st && !rx_pend_q &&
              (wtmr_q >= 20'((state == S_WAIT_DATA) ? FULL_TIMEOUT : HDR_TIMEOUT));
  end

  assign rx_start   = phy_rx_valid;
  assign tx_start   = txs_q;
  assign tx_hdr     = txh_q;
  assign phy_tx_req = (state == S_XMIT);

  task automatic build(input ftype_e t, input seq_t s, input state_e r);
    txh_q <= '{src: MY_ADDR, dst: master_q, ftype: t, mode: mode_q, seq: s};
    txs_q <= 1'b1;
    ret_q <= r;
    state <= S_BUILD;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WAITING;
      ret_q      <= S_WAITING;
      master_q   <= MASTER_ADDR;
      mode_q     <= MODE_UP;
      err_q      <= '0;
      got_data_q <= 1'b0;
      rx_exp_q   <= '0;
      tx_seq_q   <= '0;
      wtmr_q     <= '0;
      rx_pend_q  <= 1'b0;
      txw_q      <= '0;
      txr_q      <= '0;
      rxw_q      <= '0;
      rxr_q      <= '0;
      txh_q      <= '0;
      txs_q      <= 1'b0;
      ev         <= '0;
    end else begin
      txs_q <= 1'b0;
      ev    <= '0;

      if (phy_rx_valid)  rx_pend_q <= 1'b1;
      else if (rx_done)  rx_pend_q <= 1'b0;
      if (wait_st && !rx_pend_q) wtmr_q <= wtmr_q + 1'b1;

      // network-layer side of the rings
      if (nl_tx_commit && inc_ptr(txw_q) != txr_q) txw_q <= inc_ptr(txw_q);
      if (nl_rx_release && rxr_q != rxw_q)         rxr_q <= inc_ptr(rxr_q);

      unique case (state)
        S_WAITING: begin
          if (rx_done && rx_hdr_ok && rx_hdr.dst == MY_ADDR && rx_hdr.ftype == FT_POLL &&
              (rx_hdr.mode == MODE_UP || rx_hdr.mode == MODE_DOWN)) begin
            ev.polled  <= 1'b1;
            master_q   <= rx_hdr.src;
            mode_q     <= rx_hdr.mode;
            err_q      <= '0;
            got_data_q <= 1'b0;
            rx_exp_q   <= '0;
            tx_seq_q   <= '0;
            txh_q      <= '{src: MY_ADDR, dst: rx_hdr.src, ftype: FT_CTS, mode: rx_hdr.mode, seq: '0};
            txs_q      <= 1'b1;
            state      <= S_BUILD;
            if (rx_hdr.mode == MODE_DOWN) begin
              ret_q <= S_WAIT_DATA;
            end else if (txw_q != txr_q) begin
              txh_q.ftype <= FT_RTS;
              ret_q       <= S_WAIT_CTS;
            end else begin
              txh_q.ftype <= FT_TNE;
              ret_q       <= S_CLOSE;
              ev.no_data  <= 1'b1;
            end
          end
        end

        S_BUILD: if (tx_done) state <= S_XMIT;

        S_XMIT: if (phy_tx_done) begin
          wtmr_q <= '0;
          state  <= ret_q;
          if (ret_q == S_CLOSE) ev.close_wait <= 1'b1;
        end

        S_WAIT_DATA, S_WAIT_CTS, S_WAIT_ACKNAK: begin
          if (tmo || (rx_done && !(rx_hdr_ok && !rx_mine))) begin
            wtmr_q <= '0;
            if (tmo) ev.timeout <= 1'b1;
            if (!tmo && rx_good && is_cne) begin
              // the master ends the connection
              ev.cne_rx <= 1'b1;
              if (state == S_WAIT_ACKNAK && rx_hdr.ftype == FT_CNE_ACK) begin
                txr_q         <= inc_ptr(txr_q);
                ev.data_acked <= 1'b1;
              end
              build(FT_TNE, rx_exp_q, S_WAITING);
            end else if (!tmo && rx_good && state == S_WAIT_DATA && rx_hdr.ftype == FT_DATA &&
                         rx_hdr.seq == rx_exp_q && inc_ptr(rxw_q) != rxr_q) begin
              rxw_q          <= inc_ptr(rxw_q);
              rx_exp_q       <= rx_exp_q + 1'b1;
              got_data_q     <= 1'b1;
              err_q          <= '0;
              ev.data_stored <= 1'b1;
              build(FT_ACK, rx_exp_q + 1'b1, S_WAIT_DATA);
            end else if (!tmo && rx_good && state == S_WAIT_DATA && rx_hdr.ftype == FT_DATA &&
                         rx_hdr.seq == rx_exp_q - 1'b1 && got_data_q) begin
              err_q        <= '0;
              ev.duplicate <= 1'b1;
              build(FT_ACK, rx_exp_q, S_WAIT_DATA);
            end else if (!tmo && rx_good && state == S_WAIT_CTS && rx_hdr.ftype == FT_CTS) begin
              err_q <= '0;
              build(FT_DATA, tx_seq_q, S_WAIT_ACKNAK);
            end else if (!tmo && rx_good && state == S_WAIT_ACKNAK && rx_hdr.ftype == FT_ACK &&
                         rx_hdr.seq == tx_seq_q + 1'b1) begin
              err_q <= '0;
              state <= S_INC;
            end else begin
              if (!tmo) ev.bad_frame <= 1'b1;
              if (!tmo && rx_good && state == S_WAIT_DATA && rx_hdr.ftype == FT_DATA &&
                  rx_hdr.seq == rx_exp_q)
                ev.overflow <= 1'b1;
              if (err_q != 0) begin
                ev.err_close <= 1'b1;
                build(FT_TNE, rx_exp_q, S_CLOSE);
              end else begin
                err_q <= err_q + 1'b1;
                if (state == S_WAIT_DATA && got_data_q) begin
                  build(FT_NAK, rx_exp_q, S_WAIT_DATA);
                end else begin
                  // CTS, RTS or DATA is still in the output memory
                  ret_q     <= state;
                  state     <= S_XMIT;
                  ev.resend <= 1'b1;
                end
              end
            end
          end
        end

        S_INC: begin
          txr_q         <= inc_ptr(txr_q);
          tx_seq_q      <= tx_seq_q + 1'b1;
          ev.data_acked <= 1'b1;
          if (inc_ptr(txr_q) != txw_q) build(FT_DATA, tx_seq_q + 1'b1, S_WAIT_ACKNAK);
          else                         build(FT_TNE, '0, S_CLOSE);
        end

        S_CLOSE: begin
          if (rx_done && rx_good && is_cne) begin
            ev.cne_rx <= 1'b1;
            state     <= S_WAITING;
          end else if (32'(wtmr_q) >= LONG_WAIT) begin
            state <= S_WAITING;
          end else begin
            wtmr_q <= wtmr_q + 1'b1;
          end
        end

        default: state <= S_WAITING;
      endcase
    end
  end

  a_tx_idle: assert property (@(posedge clk) disable iff (!rst_n)
    tx_start |-> state == S_BUILD);
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    phy_tx_req && !phy_tx_done |=> phy_tx_req);

endmodule
