// rtu_irq -- external interrupt handling of the RTU.
//
// NIRQ external interrupt inputs are synchronised to the RTU clock (two flip-flops)
// and a rising edge becomes a one-cycle irq_event pulse. The process table releases
// every process in the wait-for-interrupt state for that interrupt, so the CPUs are
// never interrupted by the device itself: the RTU schedules the interrupt process.
// When an edge arrives while no process waits for it (irq_waiting low), it is kept
// in pending; the next wait-for-interrupt call for that input then returns at once
// and clears it (consume pulse from the service dispatcher).
// The document gives the wait-for-interrupt state and the number of sources; the
// synchroniser and the pending flag are this design's choices.
// Timing: input edge to irq_event is three clock cycles.
module rtu_irq #(
  parameter int unsigned NIRQ = 4   // document: four interrupt sources
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIRQ-1:0] ext_irq,
  input  logic [NIRQ-1:0] irq_waiting,
  input  logic [NIRQ-1:0] consume,
  output logic [NIRQ-1:0] irq_event,
  output logic [NIRQ-1:0] pending
);

  logic [NIRQ-1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= '0;
      s3        <= '0;
      irq_event <= '0;
      pending   <= '0;
    end else begin
      s1        <= ext_irq;
      s2        <= s1;
      s3        <= s2;
      irq_event <= s2 & ~s3;
      pending   <= (pending & ~consume) | (irq_event & ~irq_waiting);
    end
  end

endmodule
