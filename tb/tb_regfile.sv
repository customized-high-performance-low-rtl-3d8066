// tb_regfile: self-checking test of the register file in the three configurations the
// processor uses: 16 x 1024 bits with two read ports (RF_SIMDA), 16 x 1024 bits with
// one read port (RF_SIMDB) and 16 x 32 bits with two read ports (RF). Random writes
// and reads are checked against a shadow copy, including that a write becomes visible
// only after its clock edge and that reset clears every entry.
module tb_regfile;
  localparam int unsigned VW = 1024;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  int checks = 0, failures = 0;

  logic           a_we, b_we, s_we;
  logic [3:0]     a_wa, b_wa, s_wa;
  logic [VW-1:0]  a_wd, b_wd;
  logic [31:0]    s_wd;
  logic [1:0][3:0]     a_ra, s_ra;
  logic [0:0][3:0]     b_ra;
  logic [1:0][VW-1:0]  a_rd;
  logic [0:0][VW-1:0]  b_rd;
  logic [1:0][31:0]    s_rd;

  regfile #(.WIDTH(VW), .DEPTH(16), .NR(2)) rfa (.clk, .rst_n, .we(a_we), .waddr(a_wa), .wdata(a_wd), .raddr(a_ra), .rdata(a_rd));
  regfile #(.WIDTH(VW), .DEPTH(16), .NR(1)) rfb (.clk, .rst_n, .we(b_we), .waddr(b_wa), .wdata(b_wd), .raddr(b_ra), .rdata(b_rd));
  regfile #(.WIDTH(32), .DEPTH(16), .NR(2)) rfs (.clk, .rst_n, .we(s_we), .waddr(s_wa), .wdata(s_wd), .raddr(s_ra), .rdata(s_rd));

  logic [VW-1:0] sh_a [16], sh_b [16];
  logic [31:0]   sh_s [16];

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [VW-1:0] rvec();
    logic [VW-1:0] v;
    for (int i = 0; i < VW / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check_all();
    for (int p = 0; p < 2; p++) begin
      checks += 2;
      if (a_rd[p] !== sh_a[a_ra[p]]) begin failures++; $display("RFA port %0d reg %0d", p, a_ra[p]); end
      if (s_rd[p] !== sh_s[s_ra[p]]) begin failures++; $display("RF port %0d reg %0d", p, s_ra[p]); end
    end
    checks++;
    if (b_rd[0] !== sh_b[b_ra[0]]) begin failures++; $display("RFB reg %0d", b_ra[0]); end
  endtask

  initial begin
    a_we = 0; b_we = 0; s_we = 0; a_wa = 0; b_wa = 0; s_wa = 0; a_wd = '0; b_wd = '0; s_wd = 0;
    a_ra = '0; b_ra = '0; s_ra = '0;
    for (int i = 0; i < 16; i++) begin sh_a[i] = '0; sh_b[i] = '0; sh_s[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      a_ra[0] = 4'(i); a_ra[1] = 4'(15 - i); b_ra[0] = 4'(i); s_ra[0] = 4'(i); s_ra[1] = 4'(15 - i);
      #1 check_all();
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      a_we = $urandom_range(0, 1); a_wa = 4'($urandom); a_wd = rvec();
      b_we = $urandom_range(0, 1); b_wa = 4'($urandom); b_wd = rvec();
      s_we = $urandom_range(0, 1); s_wa = 4'($urandom); s_wd = $urandom;
      a_ra[0] = 4'($urandom); a_ra[1] = (n % 3 == 0) ? a_wa : 4'($urandom);
      b_ra[0] = (n % 3 == 1) ? b_wa : 4'($urandom);
      s_ra[0] = (n % 3 == 2) ? s_wa : 4'($urandom); s_ra[1] = 4'($urandom);
      #1 check_all();   // old contents visible before the edge
      @(posedge clk);
      if (a_we) sh_a[a_wa] = a_wd;
      if (b_we) sh_b[b_wa] = b_wd;
      if (s_we) sh_s[s_wa] = s_wd;
      #1 check_all();   // new contents after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
