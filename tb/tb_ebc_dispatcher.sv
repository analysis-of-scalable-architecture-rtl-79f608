// tb_ebc_dispatcher: checks the dispatcher's assignment of context-decision
// pairs to the two-symbol and one-symbol encoders.
//
// Random pending-pair counts (0, 1, 2 or 4 per bit-plane coder) are applied
// and followed over the cycles until all are consumed, as the encoder bank
// does.  Each cycle the testbench checks which coder gets the two-symbol
// encoder, how many pairs every coder takes, that the encoders are not
// over-subscribed, that every encoder unit serves at most one coder, and
// whether the step completes.  It also counts the extra cycles.
module tb_ebc_dispatcher;
  localparam int NB = 4;
  localparam int SW = 2;

  logic [NB-1:0][2:0] rem;
  logic [SW-1:0] ts_src;
  logic [1:0] ts_n;
  logic [NB-1:0][1:0] take;
  logic [NB-1:0][SW-1:0] unit_of;
  logic step_done;

  ebc_dispatcher #(.NBPC(NB)) dut (.*);

  int checks = 0, failures = 0, extra = 0, steps = 0;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int r [NB];
      int vals [4] = '{0, 1, 2, 4};
      for (int j = 0; j < NB; j++) r[j] = ($urandom % 3 == 0) ? vals[$urandom % 4] : $urandom % 2;
      steps++;
      forever begin
        int two, one, cap, total, left;
        bit used [NB];
        two = -1; one = -1;
        for (int j = 0; j < NB; j++) rem[j] = 3'(r[j]);
        #1;
        for (int j = NB - 1; j >= 0; j--) if (r[j] >= 2) two = j;
        for (int j = NB - 1; j >= 0; j--) if (r[j] >= 1) one = j;
        if (two >= 0) begin
          chk(int'(ts_src) == two && ts_n == 2, $sformatf("TSAE goes to the first coder with two or more pairs: %0d %0d exp %0d r=%p", ts_src, ts_n, two, r));
        end else if (one >= 0) begin
          chk(int'(ts_src) == one && ts_n == 1, "TSAE codes one pair");
        end else chk(ts_n == 0, "TSAE idle");
        cap = 0; total = 0; left = 0;
        for (int j = 0; j < NB; j++) used[j] = 0;
        for (int j = 0; j < NB; j++) begin
          int exp_t;
          exp_t = (j == int'(ts_src) && ts_n != 0) ? int'(ts_n) : (r[j] > 0 ? 1 : 0);
          chk(int'(take[j]) == exp_t, $sformatf("coder %0d takes %0d, expected %0d", j, take[j], exp_t));
          if (take[j] != 0) begin
            chk(!used[unit_of[j]], "encoder unit shared");
            used[unit_of[j]] = 1;
            chk((unit_of[j] == 0) == (j == int'(ts_src)), "unit 0 is the TSAE");
          end
          total += take[j];
          r[j] -= take[j];
          left += r[j];
        end
        chk(total <= NB + 1, "over capacity");
        chk(step_done == (left == 0), "step_done");
        #1;
        if (left == 0) break;
        extra++;
      end
    end
    chk(extra > 0, "no extra cycle seen");
    $display("steps=%0d extra cycles=%0d", steps, extra);
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
