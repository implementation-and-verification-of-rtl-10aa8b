// tb_crc_serial: self-checking test of the bit-serial CRC engine.
//
// Two engines, one with the 14-bit header polynomial and one with the 16-bit
// payload polynomial, are fed random messages from a byte array (the byte
// arrives one cycle after each request, like a RAM read). For each message:
// generation (zero tail) must match the reference LFSR CRC; checking with the
// correct CRC as tail must leave remainder 0; checking with a corrupted CRC
// must not. The cycle count of a generation is compared with the engine's
// timing rule: 2 cycles per fetched byte, 1 per shifted bit, 1 per XOR,
// plus 1 cycle for the start.
module tb_crc_serial;
  import mac_pkg::*;
  import tb_mac_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        h_start, h_tail_en, h_req, h_busy, h_done;
  logic [9:0]  h_nbits;
  logic [13:0] h_tail, h_crc;
  logic        p_start, p_tail_en, p_req, p_busy, p_done;
  logic [9:0]  p_nbits;
  logic [15:0] p_tail, p_crc;
  logic [7:0]  h_byte, p_byte;
  logic [7:0]  msg [];
  int          h_idx, p_idx;

  crc_serial #(.W(14), .POLY(HCRC_POLY)) u_h (
    .clk, .rst_n, .start(h_start), .n_bits(h_nbits), .tail_en(h_tail_en), .tail(h_tail),
    .byte_req(h_req), .byte_in(h_byte), .busy(h_busy), .done(h_done), .crc(h_crc));
  crc_serial #(.W(16), .POLY(PCRC_POLY)) u_p (
    .clk, .rst_n, .start(p_start), .n_bits(p_nbits), .tail_en(p_tail_en), .tail(p_tail),
    .byte_req(p_req), .byte_in(p_byte), .busy(p_busy), .done(p_done), .crc(p_crc));

  always_ff @(posedge clk) begin
    if (h_req) begin h_byte <= msg[h_idx]; h_idx <= h_idx + 1; end
    if (p_req) begin p_byte <= msg[p_idx]; p_idx <= p_idx + 1; end
  end

  // number of XOR steps the long division makes (reference count)
  function automatic int xor_steps(input logic [7:0] b [], input int nbits, input int w,
                                   input logic [16:0] poly, input logic [15:0] tl, input bit ten);
    logic [16:0] r = '0;
    int n = 0;
    int total = nbits + (ten ? w : 0);
    for (int i = 0; i < total; i++) begin
      logic bi = (i < nbits) ? b[i/8][7-(i%8)] : tl[w-1-(i-nbits)];
      r = (r << 1) | 17'(bi);
      if (r[w]) begin r = r ^ poly; n++; end
    end
    return n;
  endfunction

  task automatic run_h(input int nbits, input bit ten, input logic [13:0] tl,
                       output logic [13:0] res, output int cycles);
    @(negedge clk);
    h_idx = 0; h_nbits = 10'(nbits); h_tail_en = ten; h_tail = tl; h_start = 1;
    @(negedge clk); h_start = 0; cycles = 1;
    while (!h_done) begin @(negedge clk); cycles++; end
    res = h_crc;
  endtask

  task automatic run_p(input int nbits, input bit ten, input logic [15:0] tl,
                       output logic [15:0] res, output int cycles);
    @(negedge clk);
    p_idx = 0; p_nbits = 10'(nbits); p_tail_en = ten; p_tail = tl; p_start = 1;
    @(negedge clk); p_start = 0; cycles = 1;
    while (!p_done) begin @(negedge clk); cycles++; end
    res = p_crc;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] hr, hexp;
    logic [15:0] pr, pexp;
    int cyc, nb, exp_cyc, fb, fi;
    h_start = 0; p_start = 0; h_nbits = 0; p_nbits = 0; h_tail_en = 0; p_tail_en = 0;
    h_tail = 0; p_tail = 0; h_idx = 0; p_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      // header-sized message
      msg = new[8];
      foreach (msg[i]) msg[i] = 8'($urandom);
      nb = (t < 20) ? 34 : 1 + ($urandom % 60);
      hexp = 14'(ref_crc(msg, nb, 14, {2'b0, HCRC_POLY}));
      run_h(nb, 1, '0, hr, cyc);
      checks++;
      if (hr !== hexp) begin failures++; $display("hcrc gen mismatch n=%0d got %h exp %h", nb, hr, hexp); end
      exp_cyc = 1 + 2 * ((nb + 7) / 8) + nb + 14 + xor_steps(msg, nb, 14, {2'b0, HCRC_POLY}, '0, 1);
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("hcrc cycles %0d exp %0d", cyc, exp_cyc); end
      run_h(nb, 1, hexp, hr, cyc);
      checks++;
      if (hr !== 0) begin failures++; $display("hcrc check of good block gave %h", hr); end
      run_h(nb, 1, hexp ^ 14'(1 << ($urandom % 14)), hr, cyc);
      checks++;
      if (hr === 0) begin failures++; $display("hcrc check missed a corrupted CRC"); end
      // payload-sized message
      msg = new[PAYLOAD_BYTES];
      foreach (msg[i]) msg[i] = 8'($urandom);
      nb = PAYLOAD_BYTES * 8;
      pexp = ref_crc(msg, nb, 16, PCRC_POLY);
      run_p(nb, 1, '0, pr, cyc);
      checks++;
      if (pr !== pexp) begin failures++; $display("pcrc gen mismatch got %h exp %h", pr, pexp); end
      exp_cyc = 1 + 2 * PAYLOAD_BYTES + nb + 16 + xor_steps(msg, nb, 16, PCRC_POLY, '0, 1);
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("pcrc cycles %0d exp %0d", cyc, exp_cyc); end
      run_p(nb, 1, pexp, pr, cyc);
      checks++;
      if (pr !== 0) begin failures++; $display("pcrc check of good block gave %h", pr); end
      fb = $urandom % PAYLOAD_BYTES;
      fi = $urandom % 8;
      msg[fb][fi] = ~msg[fb][fi];
      run_p(nb, 1, pexp, pr, cyc);
      checks++;
      if (pr === 0) begin failures++; $display("pcrc check missed a flipped data bit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
