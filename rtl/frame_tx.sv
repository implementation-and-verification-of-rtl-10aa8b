// frame_tx: transmitter block. Builds one 64-byte frame in the output memory.
//
// The control block hands over the header fields (source, destination, type,
// mode, sequence id) and, for a DATA frame, the address in the data memory
// where the 56 payload bytes wait. The transmitter then:
//   1. feeds the 34 header bits to the header CRC engine, writing header bytes
//      0..3 to the output memory as they are fetched;
//   2. writes the 14-bit header CRC into bytes 4 (low 6 bits, after the last two
//      sequence-id bits) and 5;
//   3. for DATA: skips bytes 6-7, streams the payload from the data memory
//      through the payload CRC engine while copying each byte to bytes 8..63,
//      then writes the 16-bit payload CRC into bytes 6-7;
//      for any other type: fills bytes 6..63 with zeros.
// Writing into a random-access output memory lets the CRC be placed before
// the data it covers without a second pass, which is how the protocol builds
// frames. The transmitter is the same in master and slave: which data memory
// it reads is decided outside it.
//
// Interface: start pulse samples hdr and src_base; done pulses when the frame
// is complete. The data memory read port has one cycle of latency.
// Timing: a management frame takes about 34 shift cycles plus one XOR per set
// remainder MSB, plus 58 zero-fill cycles; a DATA frame about 448 shifts plus
// XORs plus 2 cycles per byte fetched.
module frame_tx
  import mac_pkg::*;
#(
  parameter int unsigned DAW = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  mac_hdr_t       hdr,
  input  logic [DAW-1:0] src_base,
  output logic           src_rd_en,
  output logic [DAW-1:0] src_rd_addr,
  input  logic [7:0]     src_rd_data,
  output logic           ob_we,
  output logic [5:0]     ob_addr,
  output logic [7:0]     ob_wdata,
  output logic           busy,
  output logic           done
);

  typedef enum logic [2:0] {T_IDLE, T_HDR, T_HCRC_HI, T_HCRC_LO, T_PAY, T_PCRC_HI, T_PCRC_LO, T_ZERO} state_e;

  state_e          state;
  mac_hdr_t        hdr_q;
  logic [DAW-1:0]  base_q;
  logic [5:0]      idx_q;      // next byte index to fetch
  logic [5:0]      idx_d;      // index of the byte being delivered
  logic            req_d;      // a fetched byte arrives this cycle
  logic [7:0]      hbyte_q;    // registered header byte (header "multiplexer")
  logic [39:0]     hdr_bits;

  logic            h_start, h_req, h_done;
  logic [HCRC_W-1:0] h_crc;
  logic            p_start, p_req, p_done;
  logic [PCRC_W-1:0] p_crc;

  assign hdr_bits = {hdr_q, 6'b0};

  crc_serial #(.W(HCRC_W), .POLY(HCRC_POLY), .NB_W(10)) u_hcrc (
    .clk, .rst_n, .start(h_start), .n_bits(10'(HDR_BITS)), .tail_en(1'b1),
    .tail('0), .byte_req(h_req), .byte_in(hbyte_q), .busy(), .done(h_done),
    .crc(h_crc));

  crc_serial #(.W(PCRC_W), .POLY(PCRC_POLY), .NB_W(10)) u_pcrc (
    .clk, .rst_n, .start(p_start), .n_bits(10'(PAYLOAD_BYTES * 8)), .tail_en(1'b1),
    .tail('0), .byte_req(p_req), .byte_in(src_rd_data), .busy(), .done(p_done),
    .crc(p_crc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      hdr_q   <= '0;
      base_q  <= '0;
      idx_q   <= '0;
      idx_d   <= '0;
      req_d   <= 1'b0;
      hbyte_q <= '0;
      done    <= 1'b0;
    end else begin
      done  <= 1'b0;
      req_d <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          hdr_q  <= hdr;
          base_q <= src_base;
          idx_q  <= '0;
          state  <= T_HDR;
        end
        T_HDR: begin
          if (h_req) begin
            hbyte_q <= hdr_bits[39 - 8*idx_q[2:0] -: 8];
            idx_d   <= idx_q;
            idx_q   <= idx_q + 1'b1;
            req_d   <= 1'b1;
          end
          if (h_done) state <= T_HCRC_HI;
        end
        T_HCRC_HI: state <= T_HCRC_LO;
        T_HCRC_LO: begin
          idx_q <= '0;
          state <= (hdr_q.ftype == FT_DATA) ? T_PAY : T_ZERO;
        end
        T_PAY: begin
          if (p_req) begin
            idx_d <= idx_q;
            idx_q <= idx_q + 1'b1;
            req_d <= 1'b1;
          end
          if (p_done) state <= T_PCRC_HI;
        end
        T_PCRC_HI: state <= T_PCRC_LO;
        T_PCRC_LO: begin
          state <= T_IDLE;
          done  <= 1'b1;
        end
        T_ZERO: begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == 6'(FRAME_BYTES - PCRC_OFF - 1)) begin
            state <= T_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // Engines start on the first cycle of their phase.
  assign h_start = (state == T_IDLE) && start;
  assign p_start = (state == T_HCRC_LO) && (hdr_q.ftype == FT_DATA);

  assign src_rd_en   = (state == T_PAY) && p_req;
  assign src_rd_addr = base_q + DAW'(idx_q);

  always_comb begin
    ob_we    = 1'b0;
    ob_addr  = '0;
    ob_wdata = '0;
    unique case (state)
      T_HDR: if (req_d && idx_d < 4) begin
        ob_we = 1'b1; ob_addr = idx_d; ob_wdata = hbyte_q;
      end
      T_HCRC_HI: begin
        ob_we = 1'b1; ob_addr = 6'd4; ob_wdata = {hdr_q.seq[1:0], h_crc[13:8]};
      end
      T_HCRC_LO: begin
        ob_we = 1'b1; ob_addr = 6'd5; ob_wdata = h_crc[7:0];
      end
      T_PAY: if (req_d) begin
        ob_we = 1'b1; ob_addr = 6'(PAYLOAD_OFF) + idx_d; ob_wdata = src_rd_data;
      end
      T_PCRC_HI: begin
        ob_we = 1'b1; ob_addr = 6'(PCRC_OFF); ob_wdata = p_crc[15:8];
      end
      T_PCRC_LO: begin
        ob_we = 1'b1; ob_addr = 6'(PCRC_OFF + 1); ob_wdata = p_crc[7:0];
      end
      T_ZERO: begin
        ob_we = 1'b1; ob_addr = 6'(PCRC_OFF) + idx_q; ob_wdata = 8'h00;
      end
      default: ;
    endcase
  end

  assign busy = (state != T_IDLE);

endmodule
