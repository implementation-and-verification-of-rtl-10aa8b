// master_ctrl: control block of the master. One state machine serves both
// connection modes; the current mode selects the reaction in shared states.
//
// Polling order: an uplink connection with every slave in turn, then a
// downlink connection with every slave that has data stored for it, then
// again from the start. Each connection:
//   * opening: POLL (mode in the header), wait for CTS (downlink), RTS
//     (uplink) or TNE (slave has nothing to send / cannot talk);
//   * uplink: CTS, then per DATA frame store the payload in the ring of its
//     final destination and answer ACK; a wrong frame is answered with the CTS
//     again (nothing received yet) or with a NAK;
//   * downlink: DATA from the slave's ring, wait for ACK; NAK, a wrong frame or
//     a timeout resend the same DATA frame; after an ACK "increment data"
//     advances the ring and sends the next frame or closes;
//   * closing: a TNE from the slave is answered with CNE_NAK and the next
//     connection follows at once; when the master closes itself it sends
//     CNE_ACK (all stored data acknowledged, or the last uplink frame good) or
//     CNE_NAK (errors, or the connection time ran out), then "long wait", left
//     on a TNE from the slave or after LONG_WAIT cycles.
// Two consecutive errors (wrong frame or wait timeout) close the connection
// with CNE_NAK. A frame that is simply sent again (POLL, CTS, DATA) is not
// rebuilt: the output memory still holds it and only the physical layer is
// asked to send it again. Wait timers use HDR_TIMEOUT when a header-only
// frame is expected and FULL_TIMEOUT when a data frame is expected; they pause
// while a received frame is being checked. CONN_TIME limits a connection.
//
// Frame acceptance: header CRC good, destination = master, source = polled
// slave, mode = connection mode and, for DATA, payload CRC good. Frames with a
// good header for another device are ignored.
//
// The states, the two error mechanisms, the connection timer and the
// long wait follow the protocol description. The sequence-id rule is this
// design's: DATA frames are numbered from 0 in each connection; ACK, NAK and
// CNE carry the number of the next data frame expected; a DATA frame carrying
// the previous number is a duplicate (re-acknowledged, not stored again).
// Ring memories keep one slot free so that a payload being received never
// overwrites unread data; a data frame for a full ring is refused as wrong.
// The final destination of uplink data is the 12-bit address in the first two
// payload bytes (this design's choice); unknown addresses are refused.
module master_ctrl
  import mac_pkg::*;
#(
  parameter int unsigned N_SLAVES     = 3,
  parameter int unsigned RING_FRAMES  = 24,
  parameter int unsigned DAW          = 12,
  parameter int unsigned HDR_TIMEOUT  = 2048,
  parameter int unsigned FULL_TIMEOUT = 4096,
  parameter int unsigned CONN_TIME    = 40000,
  parameter int unsigned LONG_WAIT    = 2048
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  // receiver
  input  logic            phy_rx_valid,
  output logic            rx_start,
  input  logic            rx_done,
  input  mac_hdr_t        rx_hdr,
  input  logic            rx_hdr_ok,
  input  logic            rx_is_data,
  input  logic            rx_pl_ok,
  input  addr_t           rx_route,
  output logic [DAW-1:0]  rx_wr_base,
  // transmitter
  output logic            tx_start,
  output mac_hdr_t        tx_hdr,
  output logic [DAW-1:0]  tx_src_base,
  input  logic            tx_done,
  // physical layer
  output logic            phy_tx_req,
  input  logic            phy_tx_done,
  // status
  output logic [N_SLAVES-1:0][$clog2(RING_FRAMES)-1:0] ring_count,
  output master_ev_t      ev
);

  localparam int unsigned SW     = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;
  localparam int unsigned PW     = $clog2(RING_FRAMES);
  localparam int unsigned REGION = RING_FRAMES * PAYLOAD_BYTES;

  typedef enum logic [3:0] {
    M_IDLE, M_DECIDE, M_CHECK, M_BUILD, M_XMIT, M_WAIT_CRT, M_WAIT_DATA,
    M_WAIT_ACKNAK, M_INC, M_LONG
  } state_e;

  state_e         state, ret_q;
  logic [SW-1:0]  cur_q;
  mode_e          mode_q;
  logic [1:0]     err_q;
  logic           got_data_q;
  seq_t           rx_exp_q;     // next data sequence expected (uplink)
  seq_t           tx_seq_q;     // sequence of the data frame outstanding (downlink)
  logic [19:0]    wtmr_q;       // wait timer
  logic [19:0]    ctmr_q;       // connection timer
  logic           cexp_q;       // connection time expired
  logic           rx_pend_q;    // a received frame is being checked
  logic [PW-1:0]  wr_q [N_SLAVES];
  logic [PW-1:0]  rd_q [N_SLAVES];
  mac_hdr_t       txh_q;
  logic           txs_q;

  addr_t          cur_addr;
  logic [SW:0]    route_idx;
  logic           route_ok;
  logic [SW-1:0]  route_sel;

  assign cur_addr = SLAVE_BASE_ADDR + addr_t'(cur_q);

  function automatic logic [PW-1:0] inc_ptr(input logic [PW-1:0] p);
    return (32'(p) == RING_FRAMES - 1) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [DAW-1:0] slot_addr(input logic [SW-1:0] s, input logic [PW-1:0] p);
    return DAW'(32'(s) * REGION + 32'(p) * PAYLOAD_BYTES);
  endfunction

  // Destination ring of the payload being received.
  always_comb begin
    route_idx = (SW+1)'(rx_route - SLAVE_BASE_ADDR);
    route_ok  = (rx_route >= SLAVE_BASE_ADDR) && (32'(rx_route - SLAVE_BASE_ADDR) < N_SLAVES);
    route_sel = route_ok ? route_idx[SW-1:0] : '0;
  end
  assign rx_wr_base  = slot_addr(route_sel, wr_q[route_sel]);
  assign tx_src_base = slot_addr(cur_q, rd_q[cur_q]);

  always_comb begin
    for (int i = 0; i < N_SLAVES; i++) begin
      ring_count[i] = (wr_q[i] >= rd_q[i]) ? PW'(wr_q[i] - rd_q[i])
                                           : PW'(32'(wr_q[i]) + RING_FRAMES - 32'(rd_q[i]));
    end
  end

  // Classification of a completed reception.
  logic rx_mine, rx_good, wait_st, tmo;
  always_comb begin
    rx_mine = rx_hdr_ok && (rx_hdr.dst == MASTER_ADDR);
    rx_good = rx_mine && (rx_hdr.src == cur_addr) && (rx_hdr.mode == mode_q) &&
              (!rx_is_data || rx_pl_ok);
    wait_st = (state == M_WAIT_CRT) || (state == M_WAIT_DATA) || (state == M_WAIT_ACKNAK);
    tmo     = wait_st && !rx_pend_q &&
              (wtmr_q >= 20'((state == M_WAIT_DATA) ? FULL_TIMEOUT : HDR_TIMEOUT));
  end

  assign rx_start   = phy_rx_valid;
  assign tx_start   = txs_q;
  assign tx_hdr     = txh_q;
  assign phy_tx_req = (state == M_XMIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      ret_q      <= M_IDLE;
      cur_q      <= SW'(N_SLAVES - 1);
      mode_q     <= MODE_DOWN;
      err_q      <= '0;
      got_data_q <= 1'b0;
      rx_exp_q   <= '0;
      tx_seq_q   <= '0;
      wtmr_q     <= '0;
      ctmr_q     <= '0;
      cexp_q     <= 1'b0;
      rx_pend_q  <= 1'b0;
      txh_q      <= '0;
      txs_q      <= 1'b0;
      ev         <= '0;
      for (int i = 0; i < N_SLAVES; i++) begin
        wr_q[i] <= '0;
        rd_q[i] <= '0;
      end
    end else begin
      txs_q <= 1'b0;
      ev    <= '0;

      // receiver bookkeeping and timers
      if (phy_rx_valid)  rx_pend_q <= 1'b1;
      else if (rx_done)  rx_pend_q <= 1'b0;
      if (wait_st && !rx_pend_q) wtmr_q <= wtmr_q + 1'b1;
      if (state != M_IDLE && state != M_DECIDE && state != M_CHECK) begin
        if (32'(ctmr_q) >= CONN_TIME - 1) begin
          if (!cexp_q) ev.conn_expired <= 1'b1;
          cexp_q <= 1'b1;
        end else begin
          ctmr_q <= ctmr_q + 1'b1;
        end
      end

      unique case (state)
        M_IDLE: if (enable) state <= M_DECIDE;

        M_DECIDE: begin
          if (!enable) state <= M_IDLE;
          else begin
            // next (slave, mode): all uplinks, then all downlinks
            if (32'(cur_q) == N_SLAVES - 1) begin
              cur_q  <= '0;
              mode_q <= (mode_q == MODE_UP) ? MODE_DOWN : MODE_UP;
            end else begin
              cur_q  <= cur_q + 1'b1;
            end
            err_q      <= '0;
            got_data_q <= 1'b0;
            rx_exp_q   <= '0;
            tx_seq_q   <= '0;
            ctmr_q     <= '0;
            cexp_q     <= 1'b0;
            state      <= M_CHECK;
          end
        end

        M_CHECK: begin
          if (mode_q == MODE_UP || ring_count[cur_q] != 0) begin
            txh_q    <= '{src: MASTER_ADDR, dst: cur_addr, ftype: FT_POLL, mode: mode_q, seq: '0};
            txs_q    <= 1'b1;
            ret_q    <= M_WAIT_CRT;
            state    <= M_BUILD;
            ev.poll  <= 1'b1;
          end else begin
            ev.skip  <= 1'b1;
            state    <= M_DECIDE;
          end
        end

        M_BUILD: if (tx_done) state <= M_XMIT;

        M_XMIT: if (phy_tx_done) begin
          wtmr_q <= '0;
          state  <= ret_q;
          if (ret_q == M_LONG) ev.long_wait <= 1'b1;
        end

        M_WAIT_CRT, M_WAIT_DATA, M_WAIT_ACKNAK: begin
          if (tmo || (rx_done && !(rx_hdr_ok && !rx_mine))) begin
            wtmr_q <= '0;
            if (tmo) ev.timeout <= 1'b1;
            if (!tmo && rx_good && rx_hdr.ftype == FT_TNE) begin
              // the slave ends the connection: answer CNE_NAK, no long wait
              ev.tne_rx <= 1'b1;
              build(FT_CNE_NAK, rx_exp_q, M_DECIDE);
            end else if (!tmo && rx_good && state == M_WAIT_CRT &&
                         rx_hdr.ftype == FT_CTS && mode_q == MODE_DOWN) begin
              err_q <= '0;
              build(FT_DATA, tx_seq_q, M_WAIT_ACKNAK);
            end else if (!tmo && rx_good && state == M_WAIT_CRT &&
                         rx_hdr.ftype == FT_RTS && mode_q == MODE_UP) begin
              err_q <= '0;
              build(FT_CTS, '0, M_WAIT_DATA);
            end else if (!tmo && rx_good && state == M_WAIT_DATA &&
                         rx_hdr.ftype == FT_DATA && rx_hdr.seq == rx_exp_q &&
                         route_ok && inc_ptr(wr_q[route_sel]) != rd_q[route_sel]) begin
              // new data frame: commit it to its destination ring
              wr_q[route_sel] <= inc_ptr(wr_q[route_sel]);
              rx_exp_q        <= rx_exp_q + 1'b1;
              got_data_q      <= 1'b1;
              err_q           <= '0;
              ev.data_stored  <= 1'b1;
              if (cexp_q) build_close_seq(FT_CNE_ACK, rx_exp_q + 1'b1);
              else        build(FT_ACK, rx_exp_q + 1'b1, M_WAIT_DATA);
            end else if (!tmo && rx_good && state == M_WAIT_DATA &&
                         rx_hdr.ftype == FT_DATA && rx_hdr.seq == rx_exp_q - 1'b1 && got_data_q) begin
              // repeated data frame (our ACK was lost): acknowledge again
              err_q        <= '0;
              ev.duplicate <= 1'b1;
              if (cexp_q) build_close(FT_CNE_ACK);
              else        build(FT_ACK, rx_exp_q, M_WAIT_DATA);
            end else if (!tmo && rx_good && state == M_WAIT_ACKNAK &&
                         rx_hdr.ftype == FT_ACK && rx_hdr.seq == tx_seq_q + 1'b1) begin
              err_q <= '0;
              state <= M_INC;
            end else begin
              // wrong frame, NAK or timeout
              if (!tmo) ev.bad_frame <= 1'b1;
              if (!tmo && rx_good && rx_hdr.ftype == FT_DATA && state == M_WAIT_DATA &&
                  rx_hdr.seq == rx_exp_q)
                ev.overflow <= 1'b1;
              if (cexp_q || err_q != 0) begin
                if (!cexp_q) ev.err_close <= 1'b1;
                build_close(FT_CNE_NAK);
              end else begin
                err_q <= err_q + 1'b1;
                if (state == M_WAIT_DATA && got_data_q) begin
                  build(FT_NAK, rx_exp_q, M_WAIT_DATA);
                  ev.nak_sent <= 1'b1;
                end else begin
                  // POLL, CTS or DATA is still in the output memory
                  ret_q     <= state;
                  state     <= M_XMIT;
                  ev.resend <= 1'b1;
                end
              end
            end
          end
        end

        M_INC: begin
          // increment data: the acknowledged frame leaves the ring
          rd_q[cur_q]   <= inc_ptr(rd_q[cur_q]);
          tx_seq_q      <= tx_seq_q + 1'b1;
          ev.data_acked <= 1'b1;
          if (cexp_q)
            build_close_seq(FT_CNE_NAK, tx_seq_q + 1'b1);
          else if (inc_ptr(rd_q[cur_q]) == wr_q[cur_q])
            build_close_seq(FT_CNE_ACK, tx_seq_q + 1'b1);
          else
            build(FT_DATA, tx_seq_q + 1'b1, M_WAIT_ACKNAK);
        end

        M_LONG: begin
          if (rx_done && rx_good && rx_hdr.ftype == FT_TNE) begin
            ev.tne_rx <= 1'b1;
            state     <= M_DECIDE;
          end else if (32'(wtmr_q) >= LONG_WAIT) begin
            state <= M_DECIDE;
          end else begin
            wtmr_q <= wtmr_q + 1'b1;
          end
        end

        default: state <= M_IDLE;
      endcase
    end
  end

  // Helpers that start building a frame and name the state after sending it.
  task automatic build(input ftype_e t, input seq_t s, input state_e r);
    txh_q <= '{src: MASTER_ADDR, dst: cur_addr, ftype: t, mode: mode_q, seq: s};
    txs_q <= 1'b1;
    ret_q <= r;
    state <= M_BUILD;
  endtask

  task automatic build_close_seq(input ftype_e t, input seq_t s);
    build(t, s, M_LONG);
  endtask

  task automatic build_close(input ftype_e t);
    build(t, rx_exp_q, M_LONG);
  endtask

  // The physical layer request is held until the frame has gone out.
  a_tx_idle: assert property (@(posedge clk) disable iff (!rst_n)
    tx_start |-> state == M_BUILD);
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    phy_tx_req && !phy_tx_done |=> phy_tx_req);

endmodule
