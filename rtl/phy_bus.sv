// phy_bus: the simple physical layer that links the devices of the network.
//
// It does no coding: when a device's transmitter has a frame ready in its
// output memory and raises tx_req, the bus copies the 64 bytes, one per clock,
// into the input memories of every other device, as a shared medium would.
// Then it pulses rx_valid to each of them (their control blocks start their
// receivers) and tx_done to the sender. Requests are served one at a time,
// lowest device index first; the polling protocol itself keeps at most one
// device talking.
//
// Two test inputs, sampled when a transfer starts, let a testbench disturb
// the line: inj_drop loses the frame (nobody gets rx_valid) and inj_flip
// inverts bit 0 of byte inj_byte on its way. They are this design's own
// addition, for exercising the protocol's error recovery.
//
// Timing: 1 cycle to pick a sender, 65 cycles to copy, 1 cycle to signal.
module phy_bus #(
  parameter int unsigned N_DEV = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_DEV-1:0]      tx_req,
  output logic [N_DEV-1:0]      tx_done,
  output logic                  ob_rd_en,
  output logic [5:0]            ob_rd_addr,
  input  logic [N_DEV-1:0][7:0] ob_rd_data,
  output logic [N_DEV-1:0]      ib_we,
  output logic [5:0]            ib_addr,
  output logic [7:0]            ib_wdata,
  output logic [N_DEV-1:0]      rx_valid,
  input  logic                  inj_drop,
  input  logic                  inj_flip,
  input  logic [5:0]            inj_byte,
  output logic                  busy
);

  typedef enum logic [1:0] {P_IDLE, P_COPY, P_DONE} state_e;

  localparam int unsigned SW = (N_DEV > 1) ? $clog2(N_DEV) : 1;

  state_e         state;
  logic [SW-1:0]  sel_q;
  logic [6:0]     cnt_q;
  logic           drop_q, flip_q;
  logic [5:0]     fbyte_q;
  logic [SW-1:0]  pick;
  logic           any_req;

  always_comb begin
    pick    = '0;
    any_req = 1'b0;
    for (int i = N_DEV - 1; i >= 0; i--) begin
      if (tx_req[i]) begin
        pick    = SW'(i);
        any_req = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= P_IDLE;
      sel_q   <= '0;
      cnt_q   <= '0;
      drop_q  <= 1'b0;
      flip_q  <= 1'b0;
      fbyte_q <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (any_req) begin
          sel_q   <= pick;
          cnt_q   <= '0;
          drop_q  <= inj_drop;
          flip_q  <= inj_flip;
          fbyte_q <= inj_byte;
          state   <= P_COPY;
        end
        P_COPY: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == 7'd64) state <= P_DONE;
        end
        P_DONE: state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  // Read byte cnt, write byte cnt-1 (one cycle of read latency).
  assign ob_rd_en   = (state == P_COPY) && (cnt_q < 7'd64);
  assign ob_rd_addr = cnt_q[5:0];
  assign ib_addr    = 6'(cnt_q - 7'd1);
  always_comb begin
    ib_wdata = ob_rd_data[sel_q];
    if (flip_q && (ib_addr == fbyte_q)) ib_wdata[0] = ~ib_wdata[0];
  end

  always_comb begin
    ib_we    = '0;
    rx_valid = '0;
    tx_done  = '0;
    for (int i = 0; i < N_DEV; i++) begin
      if (SW'(i) != sel_q) begin
        ib_we[i]    = (state == P_COPY) && (cnt_q != 0);
        rx_valid[i] = (state == P_DONE) && !drop_q;
      end else begin
        tx_done[i]  = (state == P_DONE);
      end
    end
  end

  assign busy = (state != P_IDLE);

endmodule
