// byte_ram: byte-wide simple dual-port RAM.
//
// Every memory of the MAC is one of these: the 64-byte output memory a
// transmitter builds a frame in, the 64-byte input memory the physical layer
// delivers a frame to, the master's per-slave store and the slave's memories
// towards the network layer. The protocol relies on ordinary random-access
// RAM rather than FIFOs so that a CRC can be written into a frame after the
// bytes it covers.
//
// One write port and one read port, both synchronous. A read returns the byte
// at rd_addr one clock after rd_en; a read and a write to the same address in
// the same cycle return the old byte. There is no reset: every location is
// written before the MAC reads it.
module byte_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : 8'h00;
  end

endmodule
