// tb_circuit_buffer: fills the buffer with random words, reads them back in
// random order and checks the one-clock read latency and that a read with
// re low keeps the previous data.
module tb_circuit_buffer;
  localparam int W = 19, DEPTH = 64, AW = 6;

  logic          clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  circuit_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] held;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int a = $urandom_range(0, DEPTH-1);
      re = 1; raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("FAIL addr %0d got %h expected %h", a, rdata, model[a]);
      end
      // overwrite while reading elsewhere
      if (t % 10 == 0) begin
        @(negedge clk);
        re = 0; we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
        held = rdata;
        @(posedge clk); #1;
        we = 0;
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL data changed with re low"); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
