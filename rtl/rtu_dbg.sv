// rtu_dbg -- debug module: a hardware event trace of the RTU.
//
// The unit listens to the other units while the system runs and records events
// into a FIFO of DEPTH 32-bit words, without adding any instruction to the
// application (no probe effect). Recorded events:
//   kind 0: a service was executed   {cpu, operation code, return code}
//   kind 1: a process switch          {cpu, new process id, 0}
//   kind 2: an external interrupt     {0, interrupt bits, 0}
// Word layout: [31:30] kind, [29:28] cpu, [27:20] op/pid/irq, [19:16] code,
// [15:0] low 16 bits of the RTU time counter. Service and switch events cannot
// occur in the same cycle (one bus access per cycle); an interrupt event in the
// same cycle as another event is dropped and flagged through overflow. A full FIFO drops new
// events and sets overflow until the next read. A read pulse pops the oldest word.
// The document describes the purpose of the debug module only; the event set, the
// FIFO and the word layout are this design's choices.
module rtu_dbg
  import rtu_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] time_lo,
  input  logic        svc_ev,
  input  cpu_t        svc_cpu,
  input  logic [7:0]  svc_op,
  input  logic [3:0]  svc_rc,
  input  logic        sw_ev,
  input  cpu_t        sw_cpu,
  input  pid_t        sw_pid,
  input  logic        irq_ev,
  input  logic [7:0]  irq_bits,
  input  logic        rd,
  output logic        empty,
  output logic [31:0] rdata,
  output logic        overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic        we;
  logic [31:0] wd;

  always_comb begin
    we = 1'b1;
    if (svc_ev)      wd = {2'd0, svc_cpu, svc_op, svc_rc, time_lo};
    else if (sw_ev)  wd = {2'd1, sw_cpu, 8'(sw_pid), 4'd0, time_lo};
    else if (irq_ev) wd = {2'd2, 2'd0, irq_bits, 4'd0, time_lo};
    else begin
      we = 1'b0;
      wd = '0;
    end
  end

  assign empty = (cnt == '0);
  assign rdata = empty ? '0 : mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      logic do_w, do_r;
      do_r = rd && !empty;
      do_w = we && (32'(cnt) < DEPTH || do_r);
      if (do_w) begin
        mem[wp] <= wd;
        wp      <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (do_r) rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_w) - (AW+1)'(do_r);
      if (we && !do_w)           overflow <= 1'b1;
      else if (rd)               overflow <= 1'b0;
      if (irq_ev && (svc_ev || sw_ev)) overflow <= 1'b1;
    end
  end

endmodule
