// cpu2s_programs_tb: runs the two further example programs of the CPU2S.
//   Program 1: IN; ADD 19; JMP 1 (never halts). Run twice: with the example
//              data segment (RAM[19h] = 0, so ACC stays at the input word)
//              and with RAM[19h] = 7, so every pass round the loop adds 7.
//              IP must go 0,1,2, then 1,2,1,2,... through the jump.
//   Program 2: LDA 10; ADD 11; STO 12; OUT; HLT. With RAM[10h] = 2 and
//              RAM[11h] = 3 the CPU must store 5 at 12h, drive 5 on the
//              output port and halt 10 cycles after reset.
// Each CPU gets its own RAM image through the INIT parameter. Expected
// values are worked out here from the instruction set. JMP, LDA and STO
// are counted and must each be seen.
module cpu2s_programs_tb;
  import cpu2s_pkg::*;
  logic clk = 0, rst;
  int checks = 0, failures = 0;
  int n_jmp = 0, n_lda = 0, n_sto = 0;

  // Example data segment, addresses 10h..1Fh.
  localparam word_t DATA [16] = '{
    16'h0002, 16'h0003, 16'h0004, 16'h0005, 16'h0001, 16'h0001, 16'h0002, 16'h0006,
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000};

  function automatic mem_image_t image(word_t c0, word_t c1, word_t c2, word_t c3,
                                       word_t c4, word_t d19);
    mem_image_t m;
    foreach (m[i]) m[i] = '0;
    m[0] = c0; m[1] = c1; m[2] = c2; m[3] = c3; m[4] = c4;
    for (int i = 0; i < 16; i++) m[16 + i] = DATA[i];
    m[5'h19] = d19;
    return m;
  endfunction

  localparam mem_image_t P1A = image(16'h8000, 16'h2019, 16'h4001, 16'h0, 16'h0, 16'h0000);
  localparam mem_image_t P1B = image(16'h8000, 16'h2019, 16'h4001, 16'h0, 16'h0, 16'h0007);
  localparam mem_image_t P2  = image(16'h0010, 16'h2011, 16'h1012, 16'h9000, 16'h7000, 16'h0000);

  word_t in_a, out_a, acc_a, ip_a, ir_a;
  word_t in_b, out_b, acc_b, ip_b, ir_b;
  word_t in_c, out_c, acc_c, ip_c, ir_c;
  logic  halt_a, halt_b, halt_c, fetch_a, fetch_b, fetch_c, zero_a, zero_b, zero_c;

  cpu2s #(.INIT(P1A)) u_p1a (.clk, .rst, .in_data(in_a), .out_data(out_a), .halted(halt_a),
    .fetch(fetch_a), .zero(zero_a), .acc(acc_a), .ip(ip_a), .ir(ir_a));
  cpu2s #(.INIT(P1B)) u_p1b (.clk, .rst, .in_data(in_b), .out_data(out_b), .halted(halt_b),
    .fetch(fetch_b), .zero(zero_b), .acc(acc_b), .ip(ip_b), .ir(ir_b));
  cpu2s #(.INIT(P2))  u_p2  (.clk, .rst, .in_data(in_c), .out_data(out_c), .halted(halt_c),
    .fetch(fetch_c), .zero(zero_c), .acc(acc_c), .ip(ip_c), .ir(ir_c));

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    word_t exp_b;
    int    cyc;
    rst = 1;
    in_a = 16'h0042; in_b = 16'h0100; in_c = 16'hbeef;
    @(posedge clk); #1;
    rst = 0;
    // ---- Program 1, both images, 20 instructions ----
    // instruction k: address 0 for k = 0, then 1,2,1,2,...
    exp_b = '0;
    for (int k = 0; k < 20; k++) begin
      int a;
      a = (k == 0) ? 0 : ((k - 1) % 2) + 1;
      check("P1 IP at fetch", ip_a, 16'(a));
      check("P1' IP at fetch", ip_b, 16'(a));
      @(posedge clk); #1;             // fetch
      @(posedge clk); #1;             // execute
      case (a)
        0: exp_b = in_b;
        1: exp_b = exp_b + 16'd7;
        2: begin
          check("P1 IP after JMP 1", ip_a, 16'd1);
          n_jmp++;
        end
        default: ;
      endcase
      check("P1 ACC", acc_a, in_a);
      check("P1' ACC", acc_b, exp_b);
      check("P1 never halts", 16'(halt_a | halt_b), 16'd0);
    end
    check("P1' ACC after 7 loop passes", acc_b, 16'h0100 + 16'd7 * 16'd10);
    // ---- Program 2 (started at the same reset, long since halted) ----
    check("P2 halted", 16'(halt_c), 16'd1);
    check("P2 ACC", acc_c, 16'h0005);
    check("P2 output", out_c, 16'h0005);
    check("P2 RAM[12h]", u_p2.u_ram.mem[5'h12], 16'h0005);
    check("P2 RAM[10h] kept", u_p2.u_ram.mem[5'h10], 16'h0002);
    check("P2 IP", ip_c, 16'd5);
    // ---- Program 2 again, step by step ----
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    cyc = 0;
    while (!halt_c && cyc < 100) begin
      @(posedge clk); #1; cyc++;
      if (cyc == 2) begin check("P2 LDA 10", acc_c, 16'h0002); n_lda++; end
      if (cyc == 4) check("P2 ADD 11", acc_c, 16'h0005);
      if (cyc == 6) begin check("P2 STO 12", u_p2.u_ram.mem[5'h12], 16'h0005); n_sto++; end
      if (cyc == 8) check("P2 OUT", out_c, 16'h0005);
    end
    check("P2 cycles to halt", 16'(cyc), 16'd10);
    checks++; if (n_jmp == 0) begin failures++; $display("FAIL no JMP seen"); end
    checks++; if (n_lda == 0) begin failures++; $display("FAIL no LDA seen"); end
    checks++; if (n_sto == 0) begin failures++; $display("FAIL no STO seen"); end
    $display("mechanisms: JMP=%0d LDA=%0d STO=%0d", n_jmp, n_lda, n_sto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
