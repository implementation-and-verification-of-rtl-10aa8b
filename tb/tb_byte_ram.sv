// tb_byte_ram: self-checking test of the byte RAM.
//
// Random writes and reads are compared with an array model: a read returns
// the stored byte exactly one clock after rd_en, rdata holds while rd_en is
// low, and a read of an address written in the same cycle returns the old byte.
module tb_byte_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 200;
  logic       we, rd_en;
  logic [7:0] waddr, raddr, wdata, rdata;
  logic [7:0] model [DEPTH];

  byte_ram #(.DEPTH(DEPTH), .AW(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_q, a;
    we = 0; rd_en = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every location
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a = 8'($urandom % DEPTH);
      rd_en = 1; raddr = a; exp_q = model[a];
      we = ($urandom % 2) != 0;
      waddr = (($urandom % 4) == 0) ? a : 8'($urandom % DEPTH);
      wdata = 8'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0; rd_en = 0;
      checks++;
      if (rdata !== exp_q) begin failures++; $display("addr %0d got %h exp %h", a, rdata, exp_q); end
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin failures++; $display("rdata did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
