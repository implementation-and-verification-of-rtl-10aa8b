// tb_frame_rx: self-checking test of the receiver block.
//
// Frames built by the reference model are placed in a behavioural input
// memory (one-cycle read latency). The test covers management frames, DATA
// frames for this device, DATA frames for another device, frames with a
// corrupted header and DATA frames with a corrupted payload. It checks the
// decoded header, hdr_ok, is_data, pl_ok, the route field, and that the 56
// payload bytes were written from wr_base on (wr_base is derived from the
// route, as a control block would).
module tb_frame_rx;
  import mac_pkg::*;
  import tb_mac_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam addr_t ME = 12'h123;

  logic        start, ib_rd_en, hdr_ok, is_data, pl_ok, dst_we, busy, done;
  logic [5:0]  ib_rd_addr;
  logic [7:0]  ib_rd_data, dst_wdata;
  mac_hdr_t    hdr;
  addr_t       route, my_addr;
  logic [11:0] wr_base, dst_addr;
  logic [7:0]  ibuf [64];
  logic [7:0]  dmem [4096];
  int          nwrites;

  frame_rx #(.DAW(12)) dut (.*);

  assign my_addr = ME;
  assign wr_base = 12'(route) * 12'd7 % 12'd3000;

  always_ff @(posedge clk) begin
    if (ib_rd_en) ib_rd_data <= ibuf[ib_rd_addr];
    if (dst_we) begin dmem[dst_addr] <= dst_wdata; nwrites <= nwrites + 1; end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    frame_t   f;
    payload_t pl;
    addr_t    src, dst, rt;
    ftype_e   ft;
    mode_e    md;
    seq_t     sq;
    int       kind, fb, fi;
    bit       exp_hdr_ok, exp_data, exp_pl_ok;
    start = 0; nwrites = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      kind = t % 5;  // 0 mgmt, 1 data for me, 2 data for other, 3 bad header, 4 bad payload
      src = addr_t'($urandom);
      dst = (kind == 2) ? ME ^ 12'h001 : ME;
      ft  = (kind == 0) ? FT_ACK : (kind == 3 && t % 2 == 0) ? FT_POLL : FT_DATA;
      md  = mode_e'($urandom % 2);
      sq  = seq_t'($urandom);
      for (int i = 0; i < PAYLOAD_BYTES; i++) pl[i] = 8'($urandom);
      rt = addr_t'($urandom);
      pl[0] = {4'h0, rt[11:8]};
      pl[1] = rt[7:0];
      f = make_frame(src, dst, ft, md, sq, pl);
      fb = (kind == 3) ? $urandom % 6 : 8 + $urandom % PAYLOAD_BYTES;
      fi = $urandom % 8;
      if (kind == 3 || kind == 4) f[fb][fi] = ~f[fb][fi];
      for (int i = 0; i < 64; i++) ibuf[i] = f[i];
      exp_hdr_ok = (kind != 3);
      exp_data   = exp_hdr_ok && ft == FT_DATA && dst == ME;
      exp_pl_ok  = exp_data && kind != 4;
      nwrites = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      chk(hdr_ok == exp_hdr_ok, $sformatf("hdr_ok kind %0d", kind));
      chk(is_data == exp_data, $sformatf("is_data kind %0d", kind));
      chk(pl_ok == exp_pl_ok, $sformatf("pl_ok kind %0d", kind));
      if (exp_hdr_ok) begin
        chk(hdr.src == src && hdr.dst == dst && hdr.ftype == ft && hdr.mode == md && hdr.seq == sq,
            "decoded header fields");
      end
      if (exp_data) begin
        chk(route == {f[8][3:0], f[9]}, "route field");
        chk(nwrites == PAYLOAD_BYTES, $sformatf("payload writes %0d", nwrites));
        for (int i = 0; i < PAYLOAD_BYTES; i++)
          chk(dmem[wr_base + 12'(i)] == f[8+i], $sformatf("payload byte %0d", i));
      end else begin
        chk(nwrites == 0, "no payload writes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
