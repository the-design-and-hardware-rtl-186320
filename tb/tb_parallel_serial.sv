// tb_parallel_serial: loads random bytes, with random gaps and random frame
// markers, collects the serial output and rebuilds the bytes MSB first.
// Also checks that back-to-back loads leave one bit per cycle with no gap
// (8 cycles per byte).
module tb_parallel_serial;
  localparam int W = 8;
  logic clk = 0, rst = 1, en = 1, load = 0, sop_in = 0, eop_in = 0;
  logic [W-1:0] din = 0;
  logic ready, cout, cout_vld, cout_sop, cout_eop;
  int checks = 0, failures = 0;

  parallel_serial #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W+1:0] sent[$];   // {sop, eop, byte}
  int nbytes = 0;
  bit gaps = 1;

  // producer
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1200; i++) begin
      if (i == 600) gaps = 0;
      // drive on the falling edge; the byte is taken at the next rising
      // edge if ready is high then (ready only changes after rising edges)
      @(negedge clk);
      din    = W'($urandom);
      sop_in = ($urandom % 5) == 0;
      eop_in = ($urandom % 5) == 0;
      load   = 1;
      while (!ready) @(negedge clk);
      sent.push_back({sop_in, eop_in, din});
      @(posedge clk);
      #1 load = 0;
      if (gaps && ($urandom % 3) == 0) repeat ($urandom % 12) @(posedge clk);
    end
    load <= 0;
  end

  // enable is dropped now and then during the gap phase
  always @(posedge clk) en <= gaps ? (($urandom % 6) != 0) : 1'b1;

  // consumer
  logic [W-1:0] acc;
  int nb = 0, first_cyc = -1, cyc = 0;
  bit bs, be;
  always @(posedge clk) begin
    cyc++;
    if (!rst && cout_vld) begin
      if (nb == 0) begin bs = cout_sop; be = 0; end
      else if (cout_sop) begin failures++; $display("sop not on first bit"); end
      acc = {acc[W-2:0], cout};
      nb++;
      if (nb == W) be = cout_eop;
      else if (cout_eop) begin failures++; $display("eop not on last bit"); end
      if (nb == W) begin
        logic [W+1:0] e;
        nb = 0;
        e = sent.pop_front();
        checks++;
        if ({bs, be, acc} !== e) begin
          failures++;
          if (failures < 10) $display("byte %0d: got %h exp %h", nbytes, {bs, be, acc}, e);
        end
        nbytes++;
        if (nbytes == 700) first_cyc = cyc;
        if (nbytes == 1100) begin
          checks++;
          // 400 bytes without gaps: 3200 bit cycles
          if (cyc - first_cyc != 400 * W) begin
            failures++;
            $display("throughput: %0d cycles for 400 bytes", cyc - first_cyc);
          end
        end
        if (nbytes == 1200) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
