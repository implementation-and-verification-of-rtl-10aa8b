// tb_arq_pair: self-checking test of the two-device frame-path set-up.
//
// The testbench pushes the button several times. For each push it captures
// the frame that reaches device B and the answer that reaches device A off
// the link, and checks them against the reference package:
//   * the frame to B is header-only (bytes 6..63 zero);
//   * the first frame's CRC field is not the CRC of its header, every later
//     frame's CRC is the CRC of its header (checked by recomputing it);
//   * B's answer is exactly the ACK frame (header CRC right) or the NAK frame
//     (header CRC wrong) from B to A, with a correct CRC of its own;
//   * after the answer, led_a is lit for an ACK and led_b for a NAK, never
//     both, and a push clears them; the whole exchange ends within a bound.
// The random header fields must also differ between pushes.
module tb_arq_pair;
  import mac_pkg::*;
  import tb_mac_ref::*;

  localparam addr_t A = 12'h001;
  localparam addr_t B = 12'h002;

  logic clk = 0, rst_n = 0, button = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic led_a, led_b, busy;

  arq_pair #(.ADDR_A(A), .ADDR_B(B)) dut (.*);

  // frames as they are written into the two input memories
  logic [7:0] to_b [FRAME_BYTES];
  logic [7:0] to_a [FRAME_BYTES];
  always_ff @(posedge clk) begin
    if (dut.ib_we[1]) to_b[dut.ib_addr] <= dut.ib_wdata;
    if (dut.ib_we[0]) to_a[dut.ib_addr] <= dut.ib_wdata;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    payload_t   zero_pl;
    frame_t     e;
    logic [7:0] hb [];
    logic [13:0] crc_ok;
    logic [33:0] prev_hdr;
    bit         hdr_right, same;
    int         cyc;
    for (int i = 0; i < PAYLOAD_BYTES; i++) zero_pl[i] = 8'h00;
    hb = new[5];
    prev_hdr = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (37) @(negedge clk);
    chk(!led_a && !led_b, "LEDs dark after reset");

    for (int push = 0; push < 6; push++) begin
      button = 1;
      cyc = 0;
      repeat (4) @(negedge clk);
      chk(!led_a && !led_b, "push clears the LEDs");
      button = 0;
      while (busy && cyc < 3000) begin @(negedge clk); cyc++; end
      chk(cyc < 1200, $sformatf("push %0d took %0d cycles", push, cyc));
      @(negedge clk);
      // the frame that went to B
      same = 1;
      for (int i = 6; i < FRAME_BYTES; i++) if (to_b[i] != 8'h00) same = 0;
      chk(same, "frame to B is header-only");
      for (int i = 0; i < 4; i++) hb[i] = to_b[i];
      hb[4] = {to_b[4][7:6], 6'b0};
      crc_ok = 14'(ref_crc(hb, 34, 14, {2'b0, HCRC_POLY}));
      hdr_right = ({to_b[4][5:0], to_b[5]} == crc_ok);
      chk(hdr_right == (push != 0),
          $sformatf("push %0d: CRC field %s", push, hdr_right ? "calculated" : "not calculated"));
      chk({to_b[0], to_b[1], to_b[2], to_b[3], to_b[4][7:6]} != prev_hdr, "header fields change");
      prev_hdr = {to_b[0], to_b[1], to_b[2], to_b[3], to_b[4][7:6]};
      // B's answer
      e = make_frame(B, A, hdr_right ? FT_ACK : FT_NAK, MODE_UP, '0, zero_pl);
      same = 1;
      for (int i = 0; i < FRAME_BYTES; i++) if (to_a[i] != e[i]) same = 0;
      chk(same, $sformatf("push %0d: answer is the %s frame", push, hdr_right ? "ACK" : "NAK"));
      chk(led_a == hdr_right && led_b == !hdr_right,
          $sformatf("push %0d: led_a=%0d led_b=%0d", push, led_a, led_b));
      repeat (100) @(negedge clk);
      chk(led_a == hdr_right && led_b == !hdr_right, "LEDs hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
