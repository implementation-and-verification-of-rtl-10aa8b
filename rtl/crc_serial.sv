// crc_serial: bit-serial CRC engine shared by the transmitter and receiver.
//
// It performs the polynomial long division one bit at a time, the way the
// protocol's CRC unit is described: a byte is fetched into an auxiliary
// register whenever that register is empty, its MSB is shifted into the LSB
// of a (W+1)-bit main register, and when the main register's MSB becomes 1 the
// generator polynomial is XORed into it in a separate cycle. After the
// N_BITS message bits, W "tail" bits are shifted in as well: zeros when a CRC
// is being generated, the received CRC when one is being checked. The result
// is the low W bits of the main register: the CRC to send, or zero when a
// checked block is intact. With tail_en low no tail is appended (used to check
// a block that already ends with its CRC).
//
// Interface: start (one-cycle pulse) samples n_bits, tail_en and tail. The
// engine pulses byte_req when it needs the next message byte; the byte source
// must present it on byte_in exactly one clock later (the registered read of
// a RAM). done pulses for one cycle with crc valid; crc holds until the next
// start.
//
// Timing: one cycle per bit shifted, one more per XOR, plus two cycles per
// fetched byte. Splitting shift and XOR into two steps is the protocol's own
// structure (it is the slower of the two options it discusses).
module crc_serial #(
  parameter int unsigned         W    = 14,
  parameter logic [W:0]          POLY = 15'h6E57,
  parameter int unsigned         NB_W = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NB_W-1:0] n_bits,
  input  logic            tail_en,
  input  logic [W-1:0]    tail,
  output logic            byte_req,
  input  logic [7:0]      byte_in,
  output logic            busy,
  output logic            done,
  output logic [W-1:0]    crc
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LOAD, S_SHIFT, S_XOR} state_e;

  state_e          state;
  logic [W:0]      main_q;
  logic [7:0]      aux_q;
  logic [3:0]      abits_q;   // bits left in the auxiliary register
  logic [NB_W-1:0] cnt_q;     // message bits shifted so far
  logic [NB_W-1:0] nbits_q;
  logic            tail_en_q;
  logic [W-1:0]    tail_q;
  logic [$clog2(W+1)-1:0] tcnt_q;

  // Values after the shift done in S_SHIFT this cycle.
  logic            in_msg;
  logic            bit_in;
  logic [W:0]      main_shift;
  logic [NB_W-1:0] cnt_n;
  logic [3:0]      abits_n;
  logic [$clog2(W+1)-1:0] tcnt_n;

  always_comb begin
    in_msg     = (cnt_q < nbits_q);
    bit_in     = in_msg ? aux_q[7] : tail_q[W-1];
    main_shift = {main_q[W-1:0], bit_in};
    cnt_n      = in_msg ? cnt_q + 1'b1 : cnt_q;
    abits_n    = in_msg ? abits_q - 1'b1 : abits_q;
    tcnt_n     = in_msg ? tcnt_q : tcnt_q + 1'b1;
  end

  // Where to go once the current bit is fully processed.
  function automatic state_e after_bit(input logic [NB_W-1:0] c, input logic [3:0] ab,
                                       input logic [$clog2(W+1)-1:0] tc);
    if (c < nbits_q)                       return (ab == 0) ? S_FETCH : S_SHIFT;
    else if (tail_en_q && (32'(tc) < W))   return S_SHIFT;
    else                                   return S_IDLE;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      main_q    <= '0;
      aux_q     <= '0;
      abits_q   <= '0;
      cnt_q     <= '0;
      nbits_q   <= '0;
      tail_en_q <= 1'b0;
      tail_q    <= '0;
      tcnt_q    <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          main_q    <= '0;
          abits_q   <= '0;
          cnt_q     <= '0;
          tcnt_q    <= '0;
          nbits_q   <= n_bits;
          tail_en_q <= tail_en;
          tail_q    <= tail;
          state     <= (n_bits != 0) ? S_FETCH : (tail_en ? S_SHIFT : S_IDLE);
          if (n_bits == 0 && !tail_en) done <= 1'b1;
        end
        S_FETCH: state <= S_LOAD;
        S_LOAD: begin
          aux_q   <= byte_in;
          abits_q <= 4'd8;
          state   <= S_SHIFT;
        end
        S_SHIFT: begin
          main_q  <= main_shift;
          cnt_q   <= cnt_n;
          abits_q <= abits_n;
          tcnt_q  <= tcnt_n;
          if (in_msg) aux_q <= {aux_q[6:0], 1'b0};
          else        tail_q <= {tail_q[W-2:0], 1'b0};
          if (main_shift[W]) state <= S_XOR;
          else begin
            state <= after_bit(cnt_n, abits_n, tcnt_n);
            if (after_bit(cnt_n, abits_n, tcnt_n) == S_IDLE) done <= 1'b1;
          end
        end
        S_XOR: begin
          main_q <= main_q ^ POLY;
          state  <= after_bit(cnt_q, abits_q, tcnt_q);
          if (after_bit(cnt_q, abits_q, tcnt_q) == S_IDLE) done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign byte_req = (state == S_FETCH);
  assign busy     = (state != S_IDLE);
  assign crc      = main_q[W-1:0];

endmodule
