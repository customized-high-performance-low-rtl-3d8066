// tb_tta_ic: self-checking test of the transport network decoder. Random instructions
// (guards, all source and destination classes, long-immediate template, SIMD bypass)
// are applied with register files modelled here as functions of their read address.
// A reference decoder written here predicts each port write (valid, index/opcode,
// data), the immediate write and the error flag for over-subscribed read ports and
// doubly written ports.
module tb_tta_ic;
  import tta_pkg::*;

  instr_t ins;
  logic   exec, guard;
  logic [1:0][3:0] rfa_raddr, rf_raddr;
  logic [0:0][3:0] rfb_raddr;
  vec_t [1:0] rfa_rdata;
  vec_t [0:0] rfb_rdata;
  logic [1:0][EW-1:0] rf_rdata;
  vec_t  lsu_res, simd_res, aux_res;
  word_t alu_res, iu_val, ra_val;
  port_wr_t wr [NPORT];
  logic limm_we, err;
  logic [30:0] limm;
  vec_t bus [NBUS];
  int checks = 0, failures = 0, n_err = 0, n_limm = 0, n_bypass = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  tta_ic dut (.*);

  function automatic vec_t vpat(int cls, int idx);
    vec_t v;
    for (int i = 0; i < LANES; i++) v[i*EW +: EW] = 32'(cls * 1000 + idx * 37 + i * 65537);
    return v;
  endfunction

  always_comb begin
    for (int p = 0; p < 2; p++) rfa_rdata[p] = vpat(1, rfa_raddr[p]);
    rfb_rdata[0] = vpat(2, rfb_raddr[0]);
    for (int p = 0; p < 2; p++) rf_rdata[p] = 32'(3000 + rf_raddr[p]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t src_val(logic [5:0] s);
    if (s < 16) return vpat(1, s);
    if (s < 32) return vpat(2, s - 16);
    if (s < 48) return VW'(32'(3000 + s - 32));
    case (s)
      48: return lsu_res;
      49: return VW'(alu_res);
      50: return simd_res;
      51: return aux_res;
      52: return VW'(iu_val);
      53: return VW'(ra_val);
      54: return VW'(guard);
      default: return '0;
    endcase
  endfunction

  function automatic int port_of(logic [6:0] d);
    if (d < 16) return 0;
    if (d < 32) return 1;
    if (d < 48) return 2;
    if (d >= 48 && d <= 54) return d - 45;
    if (d >= 64 && d < 68) return 10;
    if (d >= 68 && d < 72) return 12;
    if (d >= 72 && d < 74) return 13;
    if (d >= 80 && d < 96) return 11;
    if (d >= 96) return 14;
    return -1;
  endfunction

  initial begin
    bit          e_v [NPORT];
    logic [4:0]  e_sub [NPORT];
    vec_t        e_data [NPORT];
    bit          e_err, live;
    int          na, nb, ns, p;
    logic [5:0]  src;
    logic [6:0]  dst;
    logic [1:0]  g;
    for (int n = 0; n < 20000; n++) begin
      ins = '0;
      for (int k = 0; k < NBUS; k++) begin
        g   = 2'($urandom_range(0, 3));
        src = 6'($urandom_range(0, 56));
        dst = 7'($urandom);
        ins[15*k +: 15] = {g, src, dst};
      end
      ins[63]    = ($urandom_range(0, 7) == 0);
      ins[62:61] = 2'($urandom_range(0, 3));
      ins[60]    = 1'($urandom);
      exec  = ($urandom_range(0, 9) != 0);
      guard = 1'($urandom);
      lsu_res = vpat(4, n); simd_res = vpat(5, n); aux_res = vpat(6, n);
      alu_res = $urandom; iu_val = $urandom; ra_val = $urandom;
      // reference decode
      for (int q = 0; q < NPORT; q++) begin e_v[q] = 0; e_sub[q] = 0; e_data[q] = '0; end
      e_err = 0; na = 0; nb = 0; ns = 0;
      for (int k = 0; k < NBUS; k++) begin
        {g, src, dst} = ins[15*k +: 15];
        live = exec && !(ins[63] && k >= 2) &&
               (g == 0 || (g == 1 && guard) || (g == 2 && !guard));
        if (!live) continue;
        if (src < 16) begin na++; if (na > 2) e_err = 1; end
        else if (src < 32) begin nb++; if (nb > 1) e_err = 1; end
        else if (src < 48) begin ns++; if (ns > 2) e_err = 1; end
        p = port_of(dst);
        if (p < 0) continue;
        if (e_v[p]) e_err = 1;
        e_v[p] = 1; e_sub[p] = dst[4:0]; e_data[p] = src_val(src);
      end
      if (exec && ins[62:61] == 1) begin if (e_v[6]) e_err = 1; e_v[6] = 1; e_data[6] = simd_res; n_bypass++; end
      if (exec && ins[62:61] == 2) begin if (e_v[7]) e_err = 1; e_v[7] = 1; e_data[7] = simd_res; n_bypass++; end
      #1;
      checks++;
      if (err !== e_err) begin failures++; $display("n=%0d err %b exp %b", n, err, e_err); end
      if (e_err) n_err++;
      checks++;
      if (limm_we !== (exec && ins[63]) || (limm_we && limm !== {ins[60], ins[59:30]})) failures++;
      if (limm_we) n_limm++;
      if (!e_err)
        for (int q = 0; q < NPORT; q++) begin
          checks++;
          if (wr[q].v !== e_v[q] || (e_v[q] && (wr[q].data !== e_data[q] ||
              (q != 6 && q != 7 && wr[q].sub !== e_sub[q])))) begin
            failures++;
            $display("n=%0d port %0d v %b/%b", n, q, wr[q].v, e_v[q]);
          end
        end
      #1;
    end
    checks++;
    if (n_err == 0 || n_limm == 0 || n_bypass == 0) failures++;
    $display("errors %0d limm %0d bypass %0d", n_err, n_limm, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
