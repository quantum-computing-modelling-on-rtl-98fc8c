// tb_gate_sequencer: runs the sequencer with several lengths and checks the
// address sequence, that issue_valid follows each read by one clock, that
// done pulses exactly len + 2 clocks after start, and that a start while
// busy is ignored.
module tb_gate_sequencer;
  localparam int DEPTH = 16, AW = 4;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [AW:0]   len = '0;
  logic          rd_en, issue_valid, busy, done;
  logic [AW-1:0] rd_addr;
  int checks = 0, failures = 0;

  gate_sequencer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int n, input bit poke_busy);
    int cyc = 0, reads = 0, issues = 0, last_addr = -1, done_cyc = -1;
    bit prev_rd = 0;
    @(negedge clk);
    start = 1; len = (AW+1)'(n);
    @(negedge clk);
    start = 0;
    // count clocks from the start edge
    cyc = 1;
    while (cyc < n + 10) begin
      if (poke_busy && cyc == 2) begin start = 1; len = 1; end
      else start = 0;
      if (rd_en) begin
        checks++;
        if (int'(rd_addr) != last_addr + 1) begin failures++; $display("FAIL addr order"); end
        last_addr = int'(rd_addr);
        reads++;
      end
      checks++;
      if (issue_valid != prev_rd) begin failures++; $display("FAIL issue_valid timing"); end
      if (issue_valid) issues++;
      if (done) done_cyc = cyc;
      prev_rd = rd_en;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (reads != n || issues != n || done_cyc != n + 2) begin
      failures++;
      $display("FAIL len %0d: reads %0d issues %0d done at %0d", n, reads, issues, done_cyc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 0);
    run(5, 1);
    run(16, 0);
    run(3, 0);
    // len 0 does nothing
    @(negedge clk); start = 1; len = 0;
    @(negedge clk); start = 0;
    repeat (3) begin
      checks++;
      if (busy || done) begin failures++; $display("FAIL len 0 started"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
