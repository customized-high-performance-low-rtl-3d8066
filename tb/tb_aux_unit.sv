// tb_aux_unit: self-checking test of the vector-scalar unit: extract, insert and
// broadcast on random vectors at every lane index, with operands written before or in
// the trigger's cycle, and the one-cycle latency.
module tb_aux_unit;
  import tta_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  logic v_we, s_we, t_we;
  vec_t v_in, result;
  word_t s_in, t_in;
  aux_op_e t_op;
  int checks = 0, failures = 0;

  aux_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t rvec();
    vec_t v;
    for (int i = 0; i < LANES; i++) v[i*EW +: EW] = $urandom;
    return v;
  endfunction

  task automatic run(aux_op_e op, vec_t v, word_t s, word_t t, bit same);
    vec_t expv, prev_res;
    word_t lanes [LANES];
    @(negedge clk);
    v_we = 1; v_in = v; s_we = 1; s_in = s;
    if (!same) begin @(negedge clk); v_we = 0; s_we = 0; v_in = '0; s_in = '0; end
    t_we = 1; t_op = op; t_in = t;
    prev_res = result;
    #1 checks++;
    if (result !== prev_res) failures++;
    @(negedge clk);
    t_we = 0; v_we = 0; s_we = 0;
    for (int i = 0; i < LANES; i++) lanes[i] = v[i*EW +: EW];
    case (op)
      AUX_EXTRACT:   begin expv = '0; expv[31:0] = lanes[t % LANES]; end
      AUX_INSERT:    begin lanes[t % LANES] = s; for (int i = 0; i < LANES; i++) expv[i*EW +: EW] = lanes[i]; end
      default:       for (int i = 0; i < LANES; i++) expv[i*EW +: EW] = t;
    endcase
    checks++;
    if (result !== expv) begin failures++; $display("%s idx %0d mismatch", op.name(), t); end
  endtask

  initial begin
    v_we = 0; s_we = 0; t_we = 0; v_in = '0; s_in = 0; t_in = 0; t_op = AUX_EXTRACT;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < LANES; k++) begin
      run(AUX_EXTRACT, rvec(), $urandom, k, k[0]);
      run(AUX_INSERT, rvec(), $urandom, k, !k[0]);
    end
    for (int r = 0; r < 10; r++) run(AUX_BROADCAST, rvec(), 0, $urandom, r[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
