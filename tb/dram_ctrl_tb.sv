// dram_ctrl_tb -- the DRAM controller in both organisations, each with a DRAM matrix model
// of 16 words: one word per row with a retention of 100 cycles (the word-by-word refresh
// sweep takes up to 16 x 5 = 80 cycles under load), and four words per row with a retention
// of only 30 cycles (4 rows x 5 = 20 cycles), which only the row-wide refresh can meet.
// Each runs random reads and writes, back-to-back requests and long idle stretches
// (dram_ctrl_check); the results are summed.
module dram_ctrl_tb;
  logic clk = 0;
  logic done1, done4;
  int checks1, failures1, checks4, failures4;

  dram_ctrl_check #(.ROW_WORDS(1), .RET(100)) u_word (.clk(clk), .done(done1),
    .checks(checks1), .failures(failures1));
  dram_ctrl_check #(.ROW_WORDS(4), .RET(30)) u_row (.clk(clk), .done(done4),
    .checks(checks4), .failures(failures4));
  always #5 clk = ~clk;

  initial begin
    fork
      begin
        #1;
        wait (done1 && done4);
        #1;
        $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks4, failures1 + failures4);
        $finish;
      end
      begin
        repeat (200000) @(posedge clk);
        $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks4,
                 failures1 + failures4 + 1);
        $finish;
      end
    join_any
  end
endmodule
