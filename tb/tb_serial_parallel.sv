// tb_serial_parallel: drives random bits with a random enable and occasional
// frame starts, and compares the word register, the word-complete pulse and
// its frame flag with a model kept in the testbench, every cycle.
module tb_serial_parallel;
  localparam int W = 8;
  logic clk = 0, rst = 1, en = 0, cin = 0, sop_in = 0;
  logic [W-1:0] cout;
  logic cout_vld, cout_sop;
  int checks = 0, failures = 0, words = 0;

  serial_parallel #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] m_word;
  int m_cnt;
  bit m_vld, m_sop, m_wsop;

  initial begin
    m_word = 0; m_cnt = 0; m_vld = 0; m_sop = 0; m_wsop = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 4000; c++) begin
      en     <= ($urandom % 4) != 0;
      cin    <= 1'($urandom);
      sop_in <= ($urandom % 97) == 0;
      @(posedge clk);
      // model update with the values sampled at this edge
      m_vld = 0; m_sop = 0;
      if (en) begin
        int p;
        p = sop_in ? 0 : m_cnt;
        m_word = {m_word[W-2:0], cin};
        if (p == 0) m_wsop = sop_in;
        if (p == W - 1) begin m_vld = 1; m_sop = m_wsop; m_cnt = 0; end
        else m_cnt = p + 1;
      end
      #1;
      checks++;
      if (cout !== m_word || cout_vld !== m_vld || (m_vld && cout_sop !== m_sop)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: cout=%h exp=%h vld=%b exp=%b", c, cout, m_word, cout_vld, m_vld);
      end
      if (m_vld) words++;
    end
    checks++;
    if (words < 100) failures++;
    $display("words=%0d", words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
