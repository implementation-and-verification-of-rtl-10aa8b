// tb_frame_tx: self-checking test of the transmitter block.
//
// A behavioural data memory (random bytes, one-cycle read latency) feeds the
// transmitter; every write to the output memory is captured in an array. For
// random headers of every frame type the captured 64 bytes must equal the
// frame assembled by the reference model (header fields, header CRC, payload
// CRC and payload for DATA, zeros otherwise), and done must pulse once.
module tb_frame_tx;
  import mac_pkg::*;
  import tb_mac_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done, src_rd_en, ob_we;
  mac_hdr_t    hdr;
  logic [11:0] src_base, src_rd_addr;
  logic [7:0]  src_rd_data, ob_wdata;
  logic [5:0]  ob_addr;
  logic [7:0]  dmem [4096];
  logic [7:0]  obuf [64];

  frame_tx #(.DAW(12)) dut (.*);

  always_ff @(posedge clk) begin
    if (src_rd_en) src_rd_data <= dmem[src_rd_addr];
    if (ob_we) obuf[ob_addr] <= ob_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ftype_e types [9] = '{FT_POLL, FT_ACK, FT_NAK, FT_RTS, FT_CTS, FT_CNE_NAK, FT_CNE_ACK, FT_DATA, FT_TNE};
    frame_t   exp;
    payload_t pl;
    int       ndone, cyc;
    foreach (dmem[i]) dmem[i] = 8'($urandom);
    start = 0; hdr = '0; src_base = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 36; t++) begin
      foreach (obuf[i]) obuf[i] = 8'hA5;
      hdr.src   = addr_t'($urandom);
      hdr.dst   = addr_t'($urandom);
      hdr.ftype = (t < 18) ? types[t % 9] : FT_DATA;
      hdr.mode  = mode_e'($urandom % 2);
      hdr.seq   = seq_t'($urandom);
      src_base  = 12'($urandom % (4096 - PAYLOAD_BYTES));
      for (int i = 0; i < PAYLOAD_BYTES; i++) pl[i] = dmem[src_base + i];
      exp = make_frame(hdr.src, hdr.dst, hdr.ftype, hdr.mode, hdr.seq, pl);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      ndone = 0; cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      ndone++;
      repeat (3) begin @(negedge clk); if (done) ndone++; end
      checks++;
      if (ndone != 1) begin failures++; $display("done pulsed %0d times", ndone); end
      for (int i = 0; i < FRAME_BYTES; i++) begin
        checks++;
        if (obuf[i] !== exp[i]) begin
          failures++;
          $display("type %0d byte %0d got %h exp %h", hdr.ftype, i, obuf[i], exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
