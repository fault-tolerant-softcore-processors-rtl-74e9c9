// bram_dp_tb: checks the dual-port block RAM: contents after configuration in
// all four load modes (plain, complement, and the two SEC/DED halves, the
// latter against an encoder written here position by position), the one-clock
// read latency on both ports, and port-B writes.
module bram_dp_tb;
  import ftim_pkg::*;
  localparam int DEPTH = 256;
  localparam int LEN   = 35;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  addr_a, addr_b;
  logic [15:0] di_b;
  logic        we_b;
  logic [15:0] do_a, do_b, cd_a, cd_b;
  logic [15:0] hi_a, lo_a, hi_b, lo_b;
  logic [15:0] prog [DEPTH];
  int checks = 0, failures = 0;

  bram_dp #(.INIT_MODE(INIT_PLAIN)) dut (.clk, .addr_a, .do_a, .addr_b, .di_b, .we_b, .do_b);
  bram_dp #(.INIT_MODE(INIT_CD)) u_cd (.clk, .addr_a, .do_a(cd_a), .addr_b, .di_b('0), .we_b(1'b0), .do_b(cd_b));
  bram_dp #(.DW(11), .INIT_MODE(INIT_ECC_HI)) u_hi (.clk, .addr_a, .do_a(hi_a[10:0]), .addr_b, .di_b('0), .we_b(1'b0), .do_b(hi_b[10:0]));
  bram_dp #(.DW(11), .INIT_MODE(INIT_ECC_LO)) u_lo (.clk, .addr_a, .do_a(lo_a[10:0]), .addr_b, .di_b('0), .we_b(1'b0), .do_b(lo_b[10:0]));
  assign hi_a[15:11] = '0; assign lo_a[15:11] = '0;
  assign hi_b[15:11] = '0; assign lo_b[15:11] = '0;

  // Reference extended Hamming encoder: bit 0 overall parity, positions 1..21
  function automatic logic [21:0] ref_encode(logic [15:0] d);
    logic [21:0] cw;
    int n;
    cw = '0; n = 0;
    for (int p = 1; p <= 21; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin cw[p] = d[n]; n++; end
    for (int k = 0; k < 5; k++)
      for (int p = 1; p <= 21; p++)
        if (p[k] && p != (1 << k)) cw[1 << k] ^= cw[p];
    for (int p = 1; p <= 21; p++) cw[0] ^= cw[p];
    return cw;
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] cw;
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    $readmemh("rtl/program.hex", prog, 0, LEN - 1);
    we_b = 0; di_b = 0; addr_a = 0; addr_b = 0;
    // word 7 of the program image is 0x3111
    check("image word 7", prog[7], 16'h3111);
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr_a = 8'(i); addr_b = 8'(DEPTH - 1 - i);
      @(negedge clk);
      cw = ref_encode(prog[i]);
      check("port A plain", do_a, prog[i]);
      check("port A complement", cd_a, ~prog[i]);
      check("port A ecc hi", hi_a, {5'b0, cw[21:11]});
      check("port A ecc lo", lo_a, {5'b0, cw[10:0]});
      check("port B plain", do_b, prog[DEPTH - 1 - i]);
    end
    // read latency: output changes only at the clock edge after the address
    @(negedge clk); addr_a = 8'd7;
    @(negedge clk); addr_a = 8'd0;
    #1 check("latency: old word held until clock", do_a, 16'h3111);
    @(negedge clk);
    check("latency: new word after clock", do_a, prog[0]);
    // port B write, then read back on both ports
    for (int n = 0; n < 50; n++) begin
      logic [7:0] ad;
      logic [15:0] dv;
      ad = 8'($urandom); dv = 16'($urandom);
      @(negedge clk); addr_b = ad; di_b = dv; we_b = 1; addr_a = ad ^ 8'h01;
      @(negedge clk); we_b = 0; addr_a = ad;
      check("port A reads its own address during a port-B write", do_a, prog[ad ^ 8'h01]);
      check("port B old word during write", do_b, prog[ad]);
      prog[ad] = dv;
      @(negedge clk);
      check("port A after write", do_a, dv);
      @(negedge clk); addr_a = ad ^ 8'h01;
      @(negedge clk);
      check("neighbour untouched by the write", do_a, prog[ad ^ 8'h01]);
      addr_a = ad;
      @(negedge clk);
      check("port A after write", do_a, dv);
      check("port B after write", do_b, dv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
