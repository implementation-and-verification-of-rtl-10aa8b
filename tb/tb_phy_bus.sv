// tb_phy_bus: self-checking test of the simple physical layer.
//
// Four behavioural devices each hold a random 64-byte frame in an output
// memory model (one-cycle read latency) and collect what the bus writes into
// an input memory model. Devices request in turn (and two at once, to check
// that requests are served one after the other). For every transfer: the
// other three input memories hold an exact copy, each of them gets one
// rx_valid pulse, the sender gets tx_done and nothing else, and tx_done comes
// 66 cycles after the request is raised (1 to pick, 65 to copy). A dropped frame gives no
// rx_valid; a flipped frame differs in bit 0 of the chosen byte only.
module tb_phy_bus;
  localparam int ND = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ND-1:0]      tx_req, tx_done, ib_we, rx_valid;
  logic               ob_rd_en, inj_drop, inj_flip, busy;
  logic [5:0]         ob_rd_addr, ib_addr, inj_byte;
  logic [7:0]         ib_wdata;
  logic [ND-1:0][7:0] ob_rd_data;
  logic [7:0]         obm [ND][64];
  logic [7:0]         ibm [ND][64];
  int                 nrx [ND];
  int                 ndone [ND];

  phy_bus #(.N_DEV(ND)) dut (.*);

  always_ff @(posedge clk) begin
    for (int d = 0; d < ND; d++) begin
      if (ob_rd_en) ob_rd_data[d] <= obm[d][ob_rd_addr];
      if (ib_we[d]) ibm[d][ib_addr] <= ib_wdata;
      if (rx_valid[d]) nrx[d]++;
      if (tx_done[d]) ndone[d]++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int s, input bit drop, input bit flip, input int fb);
    int cyc;
    for (int i = 0; i < 64; i++) obm[s][i] = 8'($urandom);
    for (int d = 0; d < ND; d++) begin
      nrx[d] = 0; ndone[d] = 0;
      for (int i = 0; i < 64; i++) ibm[d][i] = 8'hEE;
    end
    @(negedge clk);
    tx_req[s] = 1; inj_drop = drop; inj_flip = flip; inj_byte = 6'(fb);
    cyc = 0;
    while (!tx_done[s]) begin @(negedge clk); cyc++; inj_drop = 0; inj_flip = 0; end
    tx_req[s] = 0;
    chk(cyc == 66, $sformatf("transfer took %0d cycles", cyc));
    @(negedge clk);
    for (int d = 0; d < ND; d++) begin
      if (d == s) begin
        chk(ndone[d] == 1 && nrx[d] == 0, "sender signals");
        chk(ibm[d][0] == 8'hEE, "sender's input memory untouched");
      end else begin
        chk(ndone[d] == 0 && nrx[d] == (drop ? 0 : 1), $sformatf("receiver %0d signals", d));
        for (int i = 0; i < 64; i++)
          chk(ibm[d][i] == ((flip && i == fb) ? obm[s][i] ^ 8'h01 : obm[s][i]),
              $sformatf("dev %0d byte %0d", d, i));
      end
    end
  endtask

  initial begin
    tx_req = '0; inj_drop = 0; inj_flip = 0; inj_byte = '0;
    for (int d = 0; d < ND; d++) begin nrx[d] = 0; ndone[d] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++)
      for (int s = 0; s < ND; s++) send(s, 0, 0, 0);
    send(2, 1, 0, 0);
    send(1, 0, 1, 17);
    send(3, 0, 1, 0);
    // two requests at once: the lower index goes first, then the other
    @(negedge clk);
    tx_req[1] = 1; tx_req[3] = 1;
    while (!tx_done[1]) @(negedge clk);
    tx_req[1] = 0;
    chk(!tx_done[3], "only one sender at a time");
    while (!tx_done[3]) @(negedge clk);
    tx_req[3] = 0;
    chk(1, "second request served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
