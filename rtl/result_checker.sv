// result_checker: self-test of the whole network with a pass LED and a fail LED.
//
// A button push starts one complete test run of the network. Each slave
// stands in for its own network layer, and the run has four steps.
//   1. LOAD. For every slave s, the checker writes FRAMES_PER_PAIR payloads
//      addressed to each other slave d into s's transmit ring and commits
//      them, one slot at a time.
//   2. RUN. The checker raises `run`, which lets the master start polling.
//      The uplink round moves every payload into the master, and the downlink
//      round delivers it to its destination.
//   3. WAIT. The checker waits until every slave's receive ring holds all
//      (N_SLAVES-1)*FRAMES_PER_PAIR payloads meant for it.
//   4. CHECK. The checker reads each received payload back byte by byte,
//      compares it with the bytes it wrote, and releases the slot.
// led_a lights if every byte matched and every expected payload arrived
// exactly once. led_b lights if anything differed, a payload came twice or
// not at all, or the transfers did not finish within TIMEOUT cycles. The
// LEDs hold until reset.
//
// Payload (s, d, k), meaning source slave s, destination d and copy k, holds:
//   byte 0-1  destination address 0x001 + d, in the low 12 bits
//   byte 2    s
//   byte 3    k
//   byte j>=4 (s*37 + d*11 + k*5 + j*3 + 1) mod 256
// Bytes 2 and 3 tell the checker which payload it is reading, so the check
// does not depend on the order in which payloads arrive. A bitmap records
// which payloads have been seen.
//
// Interface: the nl_* signals connect to the network-layer ports of the
// slaves. They follow the same rules as any network layer. Ring writes and
// reads use the slot address the slave gives in nl_tx_base / nl_rx_base.
// The read data comes one clock after nl_rx_rd_en. A commit or release
// takes effect one clock later. `active` is high from the push until reset;
// the enclosing design uses it to hand the ports to the checker.
//
// The idea follows the demonstration of the protocol. Slaves hold data for
// each other, a button starts the transfer, and a test block compares the
// slave memories afterwards, lighting LED A if all is well and LED B if not.
// The payload contents, the count per pair, the timeout and checking every
// byte instead of a sample are this design's own choices.
module result_checker
  import mac_pkg::*;
#(
  parameter int unsigned N_SLAVES        = 3,
  parameter int unsigned RING_FRAMES     = 24,
  parameter int unsigned FRAMES_PER_PAIR = 2,
  parameter int unsigned TIMEOUT         = 1000000,
  parameter int unsigned SDAW            = $clog2(RING_FRAMES * PAYLOAD_BYTES),
  parameter int unsigned PW              = $clog2(RING_FRAMES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          button,
  output logic                          active,
  output logic                          run,
  output logic                          led_a,
  output logic                          led_b,
  output logic [N_SLAVES-1:0]           nl_tx_we,
  output logic [N_SLAVES-1:0][SDAW-1:0] nl_tx_addr,
  output logic [N_SLAVES-1:0][7:0]      nl_tx_wdata,
  output logic [N_SLAVES-1:0]           nl_tx_commit,
  input  logic [N_SLAVES-1:0][SDAW-1:0] nl_tx_base,
  output logic [N_SLAVES-1:0]           nl_rx_rd_en,
  output logic [N_SLAVES-1:0][SDAW-1:0] nl_rx_addr,
  input  logic [N_SLAVES-1:0][7:0]      nl_rx_rdata,
  output logic [N_SLAVES-1:0]           nl_rx_release,
  input  logic [N_SLAVES-1:0][SDAW-1:0] nl_rx_base,
  input  logic [N_SLAVES-1:0][PW-1:0]   nl_rx_count
);

  localparam int unsigned K      = FRAMES_PER_PAIR;
  localparam int unsigned PER_RX = (N_SLAVES - 1) * K;   // payloads each slave receives
  localparam int unsigned SW     = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;
  localparam int unsigned KW     = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned TW     = $clog2(TIMEOUT + 1);

  typedef enum logic [3:0] {C_IDLE, C_LOAD, C_COMMIT, C_GAP, C_WAIT, C_READ, C_RELEASE, C_RGAP,
                            C_DONE}
    state_e;

  state_e           state;
  logic [2:0]       btn_q;
  logic [SW-1:0]    s_q, d_q;          // current slave / destination slave
  logic [KW-1:0]    k_q;
  logic [5:0]       j_q;               // byte index within the payload
  logic [5:0]       jr_q;              // byte index of the data now on nl_rx_rdata
  logic             rvalid_q;          // nl_rx_rdata holds a byte requested last cycle
  logic [$clog2(PER_RX+1)-1:0] got_q;  // payloads checked at the current slave
  logic [SW-1:0]    src_q;             // byte 2 of the payload being checked
  logic [KW-1:0]    kr_q;              // byte 3 of the payload being checked
  logic             bad_q;
  logic [TW-1:0]    tmo_q;
  logic [N_SLAVES-1:0][N_SLAVES-1:0][K-1:0] seen_q;

  // Byte j of payload (s, d, k).
  function automatic logic [7:0] pbyte(input int unsigned s, input int unsigned d,
                                       input int unsigned k, input int unsigned j);
    addr_t a;
    a = SLAVE_BASE_ADDR + addr_t'(d);
    case (j)
      0:       return {4'h0, a[11:8]};
      1:       return a[7:0];
      2:       return 8'(s);
      3:       return 8'(k);
      default: return 8'(s * 37 + d * 11 + k * 5 + j * 3 + 1);
    endcase
  endfunction

  // Next (s, d, k) in the order k fastest, then d, then s.
  logic [SW-1:0] nxt_s, nxt_d;
  logic [KW-1:0] nxt_k;
  logic          last_pair;
  always_comb begin
    nxt_s = s_q;
    nxt_d = d_q;
    nxt_k = k_q + 1'b1;
    if (32'(k_q) == K - 1) begin
      nxt_k = '0;
      nxt_d = d_q + 1'b1;
      if (32'(d_q) == N_SLAVES - 1) begin
        nxt_d = '0;
        nxt_s = s_q + 1'b1;
      end
    end
    // The last pair written is (N-1, N-2, K-1); (N-1, N-1) is skipped.
    last_pair = (32'(s_q) == N_SLAVES - 1) && (32'(d_q) == N_SLAVES - 2) && (32'(k_q) == K - 1);
  end

  logic all_full;
  always_comb begin
    all_full = 1'b1;
    for (int i = 0; i < N_SLAVES; i++)
      if (32'(nl_rx_count[i]) < PER_RX) all_full = 1'b0;
  end

  // Source slave and copy named in the payload now being read.
  logic [SW-1:0] src_now;
  logic [KW-1:0] kr_now;
  always_comb begin
    src_now = (rvalid_q && jr_q == 6'd2) ? nl_rx_rdata[d_q][SW-1:0] : src_q;
    kr_now  = (rvalid_q && jr_q == 6'd3) ? nl_rx_rdata[d_q][KW-1:0] : kr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      btn_q    <= '0;
      s_q      <= '0;
      d_q      <= '0;
      k_q      <= '0;
      j_q      <= '0;
      jr_q     <= '0;
      rvalid_q <= 1'b0;
      got_q    <= '0;
      src_q    <= '0;
      kr_q     <= '0;
      bad_q    <= 1'b0;
      tmo_q    <= '0;
      seen_q   <= '0;
      led_a    <= 1'b0;
      led_b    <= 1'b0;
    end else begin
      btn_q    <= {btn_q[1:0], button};
      rvalid_q <= 1'b0;
      unique case (state)
        C_IDLE: if (btn_q[1] && !btn_q[2]) begin
          s_q   <= '0;
          d_q   <= '0;
          k_q   <= '0;
          j_q   <= '0;
          state <= C_GAP;
        end
        // One byte per clock into the transmit slot of slave s.
        C_LOAD: begin
          if (j_q == 6'(PAYLOAD_BYTES - 1)) state <= C_COMMIT;
          else j_q <= j_q + 1'b1;
        end
        C_COMMIT: begin
          j_q   <= '0;
          state <= C_GAP;
          if (last_pair) begin
            d_q   <= '0;
            got_q <= '0;
            tmo_q <= '0;
            state <= C_WAIT;
          end else begin
            s_q <= nxt_s;
            d_q <= nxt_d;
            k_q <= nxt_k;
          end
        end
        // Let nl_tx_base move on; skip the pairs with s == d.
        C_GAP: begin
          if (s_q != d_q) state <= C_LOAD;
          else begin
            s_q <= nxt_s;
            d_q <= nxt_d;
            k_q <= nxt_k;
          end
        end
        C_WAIT: begin
          tmo_q <= tmo_q + 1'b1;
          if (all_full) begin
            j_q   <= '0;
            state <= C_READ;
          end else if (32'(tmo_q) == TIMEOUT) begin
            led_b <= 1'b1;
            state <= C_DONE;
          end
        end
        // Request bytes 0..55 of the oldest payload at slave d_q and compare
        // each one as it returns.
        C_READ: begin
          if (32'(j_q) < PAYLOAD_BYTES) begin
            j_q      <= j_q + 1'b1;
            jr_q     <= j_q;
            rvalid_q <= 1'b1;
          end
          if (rvalid_q) begin
            if (jr_q == 6'd2) src_q <= src_now;
            if (jr_q == 6'd3) kr_q  <= kr_now;
            if (jr_q == 6'd2 && (32'(src_now) >= N_SLAVES || src_now == d_q)) bad_q <= 1'b1;
            else if (jr_q == 6'd3 && 32'(kr_now) >= K) bad_q <= 1'b1;
            else if (nl_rx_rdata[d_q] != pbyte(32'(src_now), 32'(d_q), 32'(kr_now), 32'(jr_q))) bad_q <= 1'b1;
            if (32'(jr_q) == PAYLOAD_BYTES - 1) state <= C_RELEASE;
          end
        end
        C_RELEASE: begin
          if (seen_q[d_q][src_q][kr_q]) bad_q <= 1'b1;
          seen_q[d_q][src_q][kr_q] <= 1'b1;
          j_q <= '0;
          if (32'(got_q) != PER_RX - 1) begin
            got_q <= got_q + 1'b1;
            state <= C_RGAP;
          end else if (32'(d_q) != N_SLAVES - 1) begin
            got_q <= '0;
            d_q   <= d_q + 1'b1;
            state <= C_RGAP;
          end else begin
            state <= C_DONE;
          end
        end
        // Let nl_rx_base move on to the next slot.
        C_RGAP: state <= C_READ;
        C_DONE: if (!led_a && !led_b) begin
          // Every (s, d, k) with s != d must have been seen.
          if (bad_q || seen_q != expected_seen()) led_b <= 1'b1;
          else led_a <= 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  function automatic logic [N_SLAVES-1:0][N_SLAVES-1:0][K-1:0] expected_seen();
    logic [N_SLAVES-1:0][N_SLAVES-1:0][K-1:0] e;
    e = '0;
    for (int d = 0; d < N_SLAVES; d++)
      for (int s = 0; s < N_SLAVES; s++)
        if (s != d) e[d][s] = '1;
    return e;
  endfunction

  assign active = (state != C_IDLE);
  assign run    = (state == C_WAIT) || (state == C_READ) || (state == C_RELEASE) ||
                  (state == C_RGAP) ||
                  (state == C_DONE);

  always_comb begin
    nl_tx_we      = '0;
    nl_tx_addr    = '0;
    nl_tx_wdata   = '0;
    nl_tx_commit  = '0;
    nl_rx_rd_en   = '0;
    nl_rx_addr    = '0;
    nl_rx_release = '0;
    if (state == C_LOAD) begin
      nl_tx_we[s_q]    = 1'b1;
      nl_tx_addr[s_q]  = nl_tx_base[s_q] + SDAW'(j_q);
      nl_tx_wdata[s_q] = pbyte(32'(s_q), 32'(d_q), 32'(k_q), 32'(j_q));
    end
    if (state == C_COMMIT) nl_tx_commit[s_q] = 1'b1;
    if (state == C_READ && 32'(j_q) < PAYLOAD_BYTES) begin
      nl_rx_rd_en[d_q] = 1'b1;
      nl_rx_addr[d_q]  = nl_rx_base[d_q] + SDAW'(j_q);
    end
    if (state == C_RELEASE) nl_rx_release[d_q] = 1'b1;
  end

endmodule
