// tb_ebc_state_mem: checks the EBC state memory.
//
// Writes random coefficient states to random addresses, with reads issued in
// the same cycles, and checks that each read returns, one cycle later, the
// value last written before that read (old data on a same-address collision).
module tb_ebc_state_mem;
  import ebc_pkg::*;

  localparam int DEPTH = 4096;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rd_en, wr_en;
  logic [11:0] rd_addr, wr_addr;
  coef_state_t rd_data, wr_data;

  ebc_state_mem dut (.*);

  coef_state_t model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    coef_state_t expv;
    bit expect_v;
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = '0;
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    expect_v = 0; expv = '0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data != expv) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d", t);
        end
      end
      rd_en = $urandom % 2;
      wr_en = $urandom % 2;
      wr_addr = 12'($urandom % 64);
      rd_addr = ($urandom % 4 == 0) ? wr_addr : 12'($urandom % 64);
      wr_data = 3'($urandom);
      expect_v = rd_en && written[rd_addr];
      expv = model[rd_addr];
      if (wr_en) begin model[wr_addr] = wr_data; written[wr_addr] = 1; end
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
