// rtu_task_table -- the RTU's process table and process manager.
//
// Holds, for every process, its state (dormant, ready, running, blocked, suspended,
// wait-for-interrupt), current and base priority, the CPUs it may run on, the wait
// object and timeout it is blocked on, its period, and the code/value it was woken
// with. Everything is registers, so all processes are updated in parallel in one
// clock: on a clock tick every timeout and period counter counts down, an external
// interrupt event releases all processes waiting for that interrupt, and the one
// action record of the current service (block the caller, wake one process, change
// a priority, release all waiters of an object, create/terminate/suspend/resume...)
// is applied. A process switch from the bus interface moves the old process of
// that CPU back to ready and the new one to running.
//
// Wait queues are not stored as lists: a blocked process keeps the time stamp of
// when it started waiting, and two search ports return the longest-waiting and the
// most urgent process blocked on a given object (FIFO or priority order). This is
// this design's way of giving the document's FIFO / priority waiting queues.
//
// Interface: act/act_valid from the service dispatcher, sw_* from the bus
// interface, tick from the timer, irq_event from the interrupt unit. Outputs are
// the whole table (for the scheduler) and the two search results, all
// combinational from the registers; changes take effect at the next clock edge.
// Lint note: the action record carries some fields for other consumers, and
// the 8-bit switch pid has a spare top bit at NPROC = 128.
module rtu_task_table
  import rtu_pkg::*;
#(
  parameter int unsigned NPROC = 128,  // processes (document: 128)
  parameter int unsigned NIRQ  = 4     // external interrupt sources (document: 4)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic [NIRQ-1:0] irq_event,
  input  logic            act_valid,
  input  act_t            act,
  input  logic            sw_valid,     // process switch on CPU sw_cpu
  input  cpu_t            sw_cpu,
  input  logic            sw_new_valid,
  input  pid_t            sw_new,
  input  wobj_t           q_obj [2],
  output qres_t           q_res [2],
  output tinfo_t          tab   [NPROC],
  output logic [NIRQ-1:0] irq_waiting
);

  // Table index of a pid. Pids are PID_W bits on every interface; ids at or above
  // NPROC are refused by the dispatcher before they are used as an index.
  localparam int unsigned XW = (NPROC > 1) ? $clog2(NPROC) : 1;
  function automatic logic [XW-1:0] ix(pid_t p);
    return p[XW-1:0];
  endfunction

  tinfo_t           t  [NPROC];
  tinfo_t           tn [NPROC];
  logic [TMO_W-1:0] period  [NPROC];
  logic [TMO_W-1:0] pcnt    [NPROC];
  logic [TMO_W-1:0] period_n[NPROC];
  logic [TMO_W-1:0] pcnt_n  [NPROC];
  logic [31:0]      now;

  assign tab = t;

  function automatic tinfo_t make_ready(tinfo_t e, logic [31:0] stamp, rcode_e code,
                                        logic [VAL_W-1:0] val);
    e.st    = T_READY;
    e.seq   = stamp;
    e.wobj  = mk_obj(W_NONE, 8'd0);
    e.tmo   = '0;
    e.wcode = code;
    e.wval  = val;
    return e;
  endfunction

  always_comb begin
    tn       = t;
    period_n = period;
    pcnt_n   = pcnt;
    for (int i = 0; i < NPROC; i++) begin
      // clock tick: periods and timeouts
      if (tick) begin
        if (period[i] != '0) begin
          if (pcnt[i] <= 1) begin
            pcnt_n[i] = period[i];
            if (t[i].st == T_BLOCKED && t[i].wobj.kind == W_PERIOD)
              tn[i] = make_ready(tn[i], now, RC_OK, '0);
            else
              tn[i].ppend = 1'b1;
          end else begin
            pcnt_n[i] = pcnt[i] - 1'b1;
          end
        end
        if (t[i].st == T_BLOCKED && t[i].tmo != '0) begin
          if (t[i].tmo == 1)
            tn[i] = make_ready(tn[i], now,
                               (t[i].wobj.kind == W_DELAY) ? RC_OK : RC_TIMEOUT, '0);
          else
            tn[i].tmo = t[i].tmo - 1'b1;
        end
      end
      // external interrupts release their interrupt processes
      if (t[i].st == T_WAIT_IRQ && irq_event[t[i].irqn]) begin
        tn[i] = make_ready(tn[i], now, RC_OK, '0);
      end
      // release every waiter of an object (delete / flush / deallocate)
      if (act_valid && act.bcast && t[i].st == T_BLOCKED &&
          (t[i].wobj == act.bc0 || t[i].wobj == act.bc1)) begin
        if (act.bkill) begin
          tn[i].st   = T_DORMANT;
          tn[i].wobj = mk_obj(W_NONE, 8'd0);
          tn[i].tmo  = '0;
        end else begin
          tn[i] = make_ready(tn[i], now, RC_FLUSHED, '0);
        end
      end
    end

    if (act_valid) begin
      if (act.block) begin
        tn[ix(act.bpid)].st   = T_BLOCKED;
        tn[ix(act.bpid)].wobj = act.bobj;
        tn[ix(act.bpid)].tmo  = act.btmo;
        tn[ix(act.bpid)].seq  = now;
      end
      if (act.wake && t[ix(act.wpid)].st == T_BLOCKED)
        tn[ix(act.wpid)] = make_ready(tn[ix(act.wpid)], now, act.wcode, act.wval);
      case (act.pop)
        P_RAISE:   if (t[ix(act.ppid)].prio < act.pprio) tn[ix(act.ppid)].prio = act.pprio;
        P_RESTORE: tn[ix(act.ppid)].prio = t[ix(act.ppid)].base;
        P_SET:     tn[ix(act.ppid)].prio = act.pprio;
        default: ;
      endcase
      case (act.pm)
        PM_CREATE: begin
          tn[ix(act.pm_pid)]       = '0;
          tn[ix(act.pm_pid)].prio  = act.pm_arg[13:8];
          tn[ix(act.pm_pid)].base  = act.pm_arg[13:8];
          tn[ix(act.pm_pid)].aff   = (act.pm_arg[18:16] == '0) ? '1 : act.pm_arg[18:16];
          tn[ix(act.pm_pid)].seq   = now;
          tn[ix(act.pm_pid)].wcode = RC_OK;
          case (act.pm_arg[15:14])
            2'd1:    tn[ix(act.pm_pid)].st = T_BLOCKED;  // waits for resume, no object
            2'd2:    tn[ix(act.pm_pid)].st = T_SUSPENDED;
            default: tn[ix(act.pm_pid)].st = T_READY;
          endcase
          period_n[ix(act.pm_pid)] = '0;
          pcnt_n[ix(act.pm_pid)]   = '0;
        end
        PM_TERMINATE: begin
          tn[ix(act.pm_pid)].st   = T_DORMANT;
          tn[ix(act.pm_pid)].wobj = mk_obj(W_NONE, 8'd0);
          tn[ix(act.pm_pid)].tmo  = '0;
          period_n[ix(act.pm_pid)] = '0;
        end
        PM_SUSPEND: begin
          tn[ix(act.pm_pid)].st   = T_SUSPENDED;
          tn[ix(act.pm_pid)].wobj = mk_obj(W_NONE, 8'd0);
          tn[ix(act.pm_pid)].tmo  = '0;
        end
        PM_RESUME:     tn[ix(act.pm_pid)] = make_ready(tn[ix(act.pm_pid)], now, RC_OK, '0);
        PM_SET_PRIO: begin
          tn[ix(act.pm_pid)].prio = act.pm_arg[13:8];
          tn[ix(act.pm_pid)].base = act.pm_arg[13:8];
        end
        PM_SET_PERIOD: begin
          period_n[ix(act.pm_pid)] = act.pm_arg[15:0];
          pcnt_n[ix(act.pm_pid)]   = act.pm_arg[15:0];
          tn[ix(act.pm_pid)].ppend = 1'b0;
        end
        PM_CLR_PPEND:  tn[ix(act.pm_pid)].ppend = 1'b0;
        PM_WAIT_IRQ: begin
          tn[ix(act.pm_pid)].st   = T_WAIT_IRQ;
          tn[ix(act.pm_pid)].irqn = act.pm_arg[1:0];
          tn[ix(act.pm_pid)].seq  = now;
        end
        default: ;
      endcase
    end

    // process switch: the process running on sw_cpu goes back to ready
    if (sw_valid) begin
      for (int i = 0; i < NPROC; i++)
        if (tn[i].st == T_RUNNING && tn[i].cpu == sw_cpu) begin
          tn[i].st  = T_READY;
          tn[i].seq = now;
        end
      if (sw_new_valid) begin
        tn[ix(sw_new)].st  = T_RUNNING;
        tn[ix(sw_new)].cpu = sw_cpu;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPROC; i++) begin
        t[i]      <= '0;
        period[i] <= '0;
        pcnt[i]   <= '0;
      end
      now <= '0;
    end else begin
      t      <= tn;
      period <= period_n;
      pcnt   <= pcnt_n;
      now    <= now + 1'b1;
    end
  end

  // waiter search: longest-waiting and most urgent process blocked on q_obj
  always_comb begin
    for (int q = 0; q < 2; q++) begin
      q_res[q] = '0;
      for (int i = 0; i < NPROC; i++) begin
        if (t[i].st == T_BLOCKED && t[i].wobj == q_obj[q] && q_obj[q].kind != W_NONE) begin
          if (!q_res[q].found || older(t[i].seq, t[ix(q_res[q].fifo_pid)].seq)) begin
            q_res[q].fifo_pid  = pid_t'(i);
            q_res[q].fifo_prio = t[i].prio;
          end
          if (!q_res[q].found || t[i].prio > q_res[q].prio_prio ||
              (t[i].prio == q_res[q].prio_prio && older(t[i].seq, t[ix(q_res[q].prio_pid)].seq))) begin
            q_res[q].prio_pid  = pid_t'(i);
            q_res[q].prio_prio = t[i].prio;
          end
          q_res[q].found = 1'b1;
        end
      end
    end
  end

  always_comb begin
    irq_waiting = '0;
    for (int i = 0; i < NPROC; i++)
      if (t[i].st == T_WAIT_IRQ) irq_waiting[t[i].irqn] = 1'b1;
  end

endmodule
