// rtu_top -- the Real-Time Unit: an RTOS co-processor with IPC in hardware.
//
// Application CPUs (up to three) share one bus to the RTU. Each CPU writes service
// calls into its service register and reads answers from its status register; the
// RTU interrupts a CPU (irq) when that CPU must switch to another process. Inside,
// all kernel functions run as parallel units:
//   rtu_bus_if     registers, service handshake, process-switch interrupts
//   rtu_svc        service dispatcher with the IPC units
//     rtu_sem        counting semaphores
//     rtu_vcb        Virtual Communication Bus message slots
//     rtu_rq         resource queues (VxWorks semaphores, mutexes, message queues)
//   rtu_task_table process table: states, priorities, waiting, timeouts, periods
//   rtu_scheduler  priority-preemptive choice of a process for every CPU
//   rtu_timer      clock ticks, time counter, absolute and round-robin timers
//   rtu_irq        external interrupts releasing interrupt processes
//   rtu_dbg        run-time trace of services, switches and interrupts
//   rr_arbiter     round-robin arbiter for the CPUs' shared bus (bus_req/bus_gnt)
// Process context (registers, stacks, message data) stays in the CPUs' memory;
// the RTU keeps only states, priorities and references.
// The units and their services follow the document; the sizes default to its
// largest configurations (3 CPUs, 128 processes, 64 priorities, 4 interrupts,
// 16 counting semaphores up to 16, 32 VCB slots of 28 messages, 256 resource
// queues). Combining the semaphore, VCB and resource-queue units in one RTU is this
// design's choice; the document builds them into separate RTU versions.
// Lint note: rst_n resets every flop asynchronously and also disables the
// concurrent assertions in rr_arbiter and rtu_bus_if (disable iff); Verilator
// reports that second, non-flop use as SYNCASYNCNET. dbg_empty is left unused on
// purpose: software learns about an empty trace from a zero DBGR record.
module rtu_top
  import rtu_pkg::*;
#(
  parameter int unsigned NPROC    = 128,
  parameter int unsigned NIRQ     = 4,
  parameter int unsigned NSEM     = 16,
  parameter int unsigned SEM_MAX  = 16,
  parameter int unsigned NSLOT    = 32,
  parameter int unsigned DEPTH    = 28,
  parameter int unsigned NRQ      = 256,
  parameter int unsigned DBG_DEPTH = 16,
  parameter logic [31:0] TICK_DIV = 32'd50
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      addr,
  input  logic            we,
  input  logic            re,
  input  logic [31:0]     wdata,
  output logic [31:0]     rdata,
  output logic [NCPU-1:0] irq,
  input  logic [NIRQ-1:0] ext_irq,
  input  logic [NCPU-1:0] bus_req,
  output logic [NCPU-1:0] bus_gnt,
  output logic            at_event,
  output logic            dbg_overflow
);

  svc_req_t        req;
  act_t            act;
  logic            act_valid;
  tinfo_t          tab [NPROC];
  wobj_t           q_obj [2];
  qres_t           q_res [2];
  logic [NCPU-1:0] nxt_valid, yield, sw_pulse, rr_expire;
  pid_t            nxt_pid [NCPU];
  logic            sw_valid, sw_new_valid;
  cpu_t            sw_cpu;
  pid_t            sw_new;
  logic [31:0]     totr, atdr, tcr, atcr;
  logic [15:0]     rrtr [NCPU];
  logic            tick;
  logic [NIRQ-1:0] irq_event, irq_waiting, irq_pending, irq_consume;
  logic            dbg_rd, dbg_empty;
  logic [31:0]     dbg_data;

  rtu_bus_if #(.NPROC(NPROC), .TICK_DIV(TICK_DIV)) u_bus (
    .clk, .rst_n, .addr, .we, .re, .wdata, .rdata, .irq,
    .req, .act, .tab, .nxt_valid, .nxt_pid,
    .sw_valid, .sw_cpu, .sw_new_valid, .sw_new, .sw_pulse, .yield,
    .totr, .atdr, .rrtr, .tcr, .atcr, .rr_expire,
    .dbg_rd, .dbg_data);

  rtu_svc #(.NPROC(NPROC), .NIRQ(NIRQ), .NSEM(NSEM), .SEM_MAX(SEM_MAX),
            .NSLOT(NSLOT), .DEPTH(DEPTH), .NRQ(NRQ)) u_svc (
    .clk, .rst_n, .req, .tab, .q_res, .irq_pending, .q_obj, .act_valid, .act,
    .irq_consume);

  rtu_task_table #(.NPROC(NPROC), .NIRQ(NIRQ)) u_tab (
    .clk, .rst_n, .tick, .irq_event, .act_valid, .act,
    .sw_valid, .sw_cpu, .sw_new_valid, .sw_new, .q_obj, .q_res, .tab, .irq_waiting);

  rtu_scheduler #(.NPROC(NPROC)) u_sched (
    .tab, .yield, .nxt_valid, .nxt_pid);

  rtu_timer u_timer (
    .clk, .rst_n, .totr, .atdr, .rrtr, .sw_pulse, .tick, .tcr, .atcr, .at_event,
    .rr_expire);

  rtu_irq #(.NIRQ(NIRQ)) u_irq (
    .clk, .rst_n, .ext_irq, .irq_waiting, .consume(irq_consume), .irq_event,
    .pending(irq_pending));

  rtu_dbg #(.DEPTH(DBG_DEPTH)) u_dbg (
    .clk, .rst_n, .time_lo(tcr[15:0]),
    .svc_ev(act_valid), .svc_cpu(req.cpu), .svc_op(req.op), .svc_rc(act.rcode),
    .sw_ev(sw_valid), .sw_cpu, .sw_pid(sw_new_valid ? sw_new : '1),
    .irq_ev(irq_event != '0), .irq_bits(8'(irq_event)),
    .rd(dbg_rd), .empty(dbg_empty), .rdata(dbg_data), .overflow(dbg_overflow));

  rr_arbiter #(.N(NCPU)) u_arb (
    .clk, .rst_n, .req(bus_req), .gnt(bus_gnt));

endmodule
