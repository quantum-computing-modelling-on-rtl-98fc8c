// gate_sequencer: steps through the circuit buffer and issues one gate per
// clock to the emulation datapath.
//
// A start pulse with len > 0 begins a run: the sequencer reads addresses
// 0 .. len-1 on consecutive clocks; because the buffer answers one clock after
// the address, issue_valid follows each read by one clock and lines up with
// the buffer's read data. done pulses in the clock after the last gate was
// issued, so a run of len gates takes len + 2 clocks from start to done.
// Gates are applied strictly one after another through one shared datapath;
// that serial order is the point of the design. start is ignored while busy.
// The serial application of gates through one shared datapath follows the
// source; the start/len/done handshake and the timing are this design's own.
module gate_sequencer #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   len,          // number of gates, 0 .. DEPTH
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          issue_valid,  // buffer read data is a gate to apply
  output logic          busy,
  output logic          done
);

  logic [AW:0] cnt_q;        // gates read so far
  logic [AW:0] len_q;
  logic        reading_q;

  assign rd_en   = reading_q;
  assign rd_addr = cnt_q[AW-1:0];
  assign busy    = reading_q | issue_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      len_q       <= '0;
      reading_q   <= 1'b0;
      issue_valid <= 1'b0;
      done        <= 1'b0;
    end else begin
      issue_valid <= reading_q;
      done        <= issue_valid & ~reading_q;
      if (!busy && start && len != 0) begin
        cnt_q     <= '0;
        len_q     <= len;
        reading_q <= 1'b1;
      end else if (reading_q) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q + 1'b1 == len_q) reading_q <= 1'b0;
      end
    end
  end

  a_len_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    start && !busy |-> len <= (AW+1)'(DEPTH));

endmodule
