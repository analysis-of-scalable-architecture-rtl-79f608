// tb_ebc_pkg: checks the table functions of ebc_pkg exhaustively.
//
// Zero-coding contexts are compared for every sub-band orientation and every
// count of significant horizontal, vertical and diagonal neighbours; sign
// contexts and XOR bits for every combination of the four direct neighbours
// being insignificant, positive or negative; refinement contexts for all
// inputs; all 47 rows of the probability table; and the initial context
// states.  The expected values come from the independent reference package.
module tb_ebc_pkg;
  import ebc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  function automatic int nb(input int code);   // 0 none, 1 positive, 2 negative
    return (code == 0) ? 0 : ((code == 1) ? 1 : -1);
  endfunction

  initial begin
    for (int b = 0; b < 3; b++)
      for (int h = 0; h <= 2; h++)
        for (int v = 0; v <= 2; v++)
          for (int d = 0; d <= 4; d++)
            check(int'(zc_context(band_e'(b), 2'(h), 2'(v), 3'(d))) == zc(b, h, v, d),
                  $sformatf("zero coding band %0d h%0d v%0d d%0d", b, h, v, d));
    for (int c = 0; c < 81; c++) begin
      int q [4];
      int hc, vc, e;
      logic [5:0] r;
      for (int i = 0; i < 4; i++) q[i] = (c / (3 ** i)) % 3;
      hc = nb(q[0]) + nb(q[1]);
      vc = nb(q[2]) + nb(q[3]);
      e = sc(hc, vc);
      r = sc_context(q[0] != 0, q[0] == 2, q[1] != 0, q[1] == 2,
                     q[2] != 0, q[2] == 2, q[3] != 0, q[3] == 2);
      check(int'(r[4:0]) * 2 + int'(r[5]) == e, $sformatf("sign coding case %0d", c));
    end
    check(mr_context(1'b0, 1'b0) == 5'd16 && mr_context(1'b0, 1'b1) == 5'd16, "refinement, later");
    check(mr_context(1'b1, 1'b0) == 5'd14 && mr_context(1'b1, 1'b1) == 5'd15, "refinement, first");
    for (int i = 0; i < 47; i++) begin
      int qe, nm, nl, sw;
      qe_row_t r;
      qe_tab(i, qe, nm, nl, sw);
      r = qe_row(6'(i));
      check(int'(r.qe) == qe && int'(r.nmps) == nm && int'(r.nlps) == nl && int'(r.sw) == sw,
            $sformatf("probability row %0d", i));
    end
    for (int i = 0; i < NUM_CTX; i++) begin
      ctx_state_t s;
      int e;
      s = ctx_init(i);
      e = (i == 0) ? 4 : ((i == CX_RL) ? 3 : ((i == CX_UNI) ? 46 : 0));
      check(int'(s.idx) == e && s.mps == 1'b0, $sformatf("initial state of context %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
