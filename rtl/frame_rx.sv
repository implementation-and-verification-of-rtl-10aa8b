// frame_rx: receiver block. Checks a frame in the input memory, extracts its
// header for the control block and stores its payload.
//
// On start the receiver reads header bytes 0..5 through the header CRC engine
// (all 48 bits, CRC included: an intact header leaves a zero remainder) and
// keeps the bytes to decode the header fields. If the header is good, the
// frame is DATA and it is addressed to this device, the receiver goes on:
//   1. it reads the received payload CRC (bytes 6-7) first, because the memory
//      is read in order and the CRC is needed only at the end;
//   2. it reads the first two payload bytes (bytes 8-9) and presents them on
//      route: the 12-bit final destination carried in the payload. The control
//      block answers, combinationally, with wr_base, the first address of the
//      ring-memory slot the payload goes to; it is sampled one cycle later;
//   3. it streams the 56 payload bytes through the payload CRC engine, with the
//      received CRC appended as tail, and writes each byte to wr_base + i.
// pl_ok tells whether the payload CRC remainder was zero. The payload is
// written even when it turns out bad: the control block then simply does not
// advance its ring pointer, and the slot is overwritten later.
//
// The header-first check, storing the CRC before the data, and writing straight
// into the destination ring without an auxiliary buffer follow the protocol
// description. Reading the route field before the payload is this design's
// way of letting the master choose the destination memory.
//
// Interface: start pulse; done pulses when hdr/hdr_ok/pl_ok/is_data are valid;
// they then hold until the next start. Input memory reads have one cycle of
// latency.
module frame_rx
  import mac_pkg::*;
#(
  parameter int unsigned DAW = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  addr_t          my_addr,
  output logic           ib_rd_en,
  output logic [5:0]     ib_rd_addr,
  input  logic [7:0]     ib_rd_data,
  output mac_hdr_t       hdr,
  output logic           hdr_ok,
  output logic           is_data,   // the payload was checked
  output logic           pl_ok,
  output addr_t          route,
  input  logic [DAW-1:0] wr_base,
  output logic           dst_we,
  output logic [DAW-1:0] dst_addr,
  output logic [7:0]     dst_wdata,
  output logic           busy,
  output logic           done
);

  typedef enum logic [2:0] {R_IDLE, R_HDR, R_HDEC, R_PEEK, R_BASE, R_PAY} state_e;

  state_e          state;
  logic [47:0]     hbytes_q;
  logic [5:0]      idx_q, idx_d;
  logic            req_d;
  logic [2:0]      pk_q;
  logic [15:0]     pcrc_q;
  logic [DAW-1:0]  base_q;

  logic            h_start, h_req, h_done;
  logic [HCRC_W-1:0] h_crc;
  logic            p_start, p_req, p_done;
  logic [PCRC_W-1:0] p_crc;

  mac_hdr_t        hdr_dec;
  assign hdr_dec = mac_hdr_t'(hbytes_q[47:14]);

  crc_serial #(.W(HCRC_W), .POLY(HCRC_POLY), .NB_W(10)) u_hcrc (
    .clk, .rst_n, .start(h_start), .n_bits(10'(HDR_BITS + HCRC_W)), .tail_en(1'b0),
    .tail('0), .byte_req(h_req), .byte_in(ib_rd_data), .busy(), .done(h_done),
    .crc(h_crc));

  crc_serial #(.W(PCRC_W), .POLY(PCRC_POLY), .NB_W(10)) u_pcrc (
    .clk, .rst_n, .start(p_start), .n_bits(10'(PAYLOAD_BYTES * 8)), .tail_en(1'b1),
    .tail(pcrc_q), .byte_req(p_req), .byte_in(ib_rd_data), .busy(), .done(p_done),
    .crc(p_crc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_IDLE;
      hbytes_q <= '0;
      idx_q    <= '0;
      idx_d    <= '0;
      req_d    <= 1'b0;
      pk_q     <= '0;
      pcrc_q   <= '0;
      base_q   <= '0;
      hdr      <= '0;
      hdr_ok   <= 1'b0;
      is_data  <= 1'b0;
      pl_ok    <= 1'b0;
      route    <= '0;
      done     <= 1'b0;
    end else begin
      done  <= 1'b0;
      req_d <= 1'b0;
      unique case (state)
        R_IDLE: if (start) begin
          idx_q   <= '0;
          hdr_ok  <= 1'b0;
          is_data <= 1'b0;
          pl_ok   <= 1'b0;
          state   <= R_HDR;
        end
        R_HDR: begin
          if (h_req) begin
            idx_q <= idx_q + 1'b1;
            req_d <= 1'b1;
          end
          if (req_d) hbytes_q <= {hbytes_q[39:0], ib_rd_data};
          if (h_done) state <= R_HDEC;
        end
        R_HDEC: begin
          hdr    <= hdr_dec;
          hdr_ok <= (h_crc == '0);
          pk_q   <= '0;
          if ((h_crc == '0) && (hdr_dec.ftype == FT_DATA) && (hdr_dec.dst == my_addr)) begin
            state <= R_PEEK;
          end else begin
            state <= R_IDLE;
            done  <= 1'b1;
          end
        end
        R_PEEK: begin
          // reads of bytes 6,7,8,9 issued at pk 0..3, data back at pk 1..4
          pk_q <= pk_q + 1'b1;
          unique case (pk_q)
            3'd1: pcrc_q[15:8] <= ib_rd_data;
            3'd2: pcrc_q[7:0]  <= ib_rd_data;
            3'd3: route[11:8]  <= ib_rd_data[3:0];
            3'd4: begin
              route[7:0] <= ib_rd_data;
              state      <= R_BASE;
            end
            default: ;
          endcase
        end
        R_BASE: begin
          base_q <= wr_base;
          idx_q  <= '0;
          state  <= R_PAY;
        end
        R_PAY: begin
          if (p_req) begin
            idx_d <= idx_q;
            idx_q <= idx_q + 1'b1;
            req_d <= 1'b1;
          end
          if (p_done) begin
            is_data <= 1'b1;
            pl_ok   <= (p_crc == '0);
            state   <= R_IDLE;
            done    <= 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  assign h_start = (state == R_IDLE) && start;
  assign p_start = (state == R_BASE);

  always_comb begin
    ib_rd_en   = 1'b0;
    ib_rd_addr = '0;
    unique case (state)
      R_HDR:  begin ib_rd_en = h_req; ib_rd_addr = idx_q; end
      R_PEEK: begin ib_rd_en = (pk_q < 4); ib_rd_addr = 6'(PCRC_OFF) + 6'(pk_q); end
      R_PAY:  begin ib_rd_en = p_req; ib_rd_addr = 6'(PAYLOAD_OFF) + idx_q; end
      default: ;
    endcase
  end

  assign dst_we    = (state == R_PAY) && req_d;
  assign dst_addr  = base_q + DAW'(idx_d);
  assign dst_wdata = ib_rd_data;
  assign busy      = (state != R_IDLE);

endmodule
