// send_unit: parallel interface that returns a hardware process's result to
// the microcontroller. For each new result it first raises an interrupt
// request, then puts the result on the parallel result port, where it stays
// until the next result. The interrupt line drives the microcontroller's IRQ
// pin, which is active low, and is held low for IRQ_CYCLES clocks so that
// the level-sensitive input sees it; the receiving task then reads the port
// from its interrupt service routine.
//
// Timing: res_valid in cycle t; irq_n low from t+1 to t+IRQ_CYCLES; result
// and a one-cycle result_strobe from t+2. A result arriving while irq_n is
// low restarts the sequence.
// Following the design: interrupt first, then result, over parallel lines.
// This design's choices: the active-low level pulse and its length.
module send_unit #(
  parameter int unsigned RW         = 9,
  parameter int unsigned IRQ_CYCLES = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          res_valid,
  input  logic [RW-1:0] res,
  output logic [RW-1:0] result,
  output logic          result_strobe,
  output logic          irq_n
);

  logic [$clog2(IRQ_CYCLES+1)-1:0] cnt;
  logic [RW-1:0] held;
  logic          pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt           <= '0;
      held          <= '0;
      pend          <= 1'b0;
      result        <= '0;
      result_strobe <= 1'b0;
      irq_n         <= 1'b1;
    end else begin
      result_strobe <= 1'b0;
      if (res_valid) begin
        held  <= res;
        pend  <= 1'b1;
        irq_n <= 1'b0;
        cnt   <= ($bits(cnt))'(IRQ_CYCLES - 1);
      end else begin
        if (pend) begin
          result        <= held;
          result_strobe <= 1'b1;
          pend          <= 1'b0;
        end
        if (cnt != '0) cnt <= cnt - 1'b1;
        else           irq_n <= 1'b1;
      end
    end
  end

endmodule
