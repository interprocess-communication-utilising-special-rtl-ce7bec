// rtu_svc -- service dispatcher of the RTU.
//
// Takes one service request at a time (operation code, 24-bit argument, calling
// CPU and the process running there) and produces, in the same cycle, the answer
// for the caller (return code, 16-bit value) and one action record for the process
// table. Process management, time and OSE-signal services are decided here:
//   create / terminate / suspend / resume / set_prio / task_info  (by pid)
//   delay n        : caller blocked for n ticks
//   set_period n, wait_period : periodic start; a period that elapsed while the
//                    process was busy makes the next wait return at once
//   wait_irq n     : caller enters the wait-for-interrupt state (or returns at once
//                    when that interrupt is already pending)
//   sig_recv t     : caller waits on its own signal flag (optional timeout)
//   sig_send pid   : releases pid if it waits on its signal flag (rval = 1) -- the
//                    signal buffers and queues themselves are kept by software
// Semaphore (0x2x), VCB (0x3x) and resource-queue (0x4x) services go to rtu_sem,
// rtu_vcb and rtu_rq, which are instantiated here. The dispatcher also tells the
// process table which two wait objects to search, so the units see their waiters.
// A service that would block while no process runs on the calling CPU (start-up
// code) is refused with NOT_OK.
// The service set follows the document; the grouping and codes are this design's.
// Lint note: only some fields of the caller's process-table entry are used; the whole
// entry is selected because it is one packed record.
module rtu_svc
  import rtu_pkg::*;
#(
  parameter int unsigned NPROC   = 128,
  parameter int unsigned NIRQ    = 4,
  parameter int unsigned NSEM    = 16,
  parameter int unsigned SEM_MAX = 16,
  parameter int unsigned NSLOT   = 32,
  parameter int unsigned DEPTH   = 28,
  parameter int unsigned NRQ     = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  svc_req_t        req,
  input  tinfo_t          tab [NPROC],
  input  qres_t           q_res [2],
  input  logic [NIRQ-1:0] irq_pending,
  output wobj_t           q_obj [2],
  output logic            act_valid,
  output act_t            act,
  output logic [NIRQ-1:0] irq_consume
);

  // Table index of a pid. Pids are PID_W bits on every interface; ids at or above
  // NPROC are refused by the dispatcher before they are used as an index.
  localparam int unsigned XW = (NPROC > 1) ? $clog2(NPROC) : 1;
  function automatic logic [XW-1:0] ix(pid_t p);
    return p[XW-1:0];
  endfunction

  svc_req_t req_sem, req_vcb, req_rq;
  act_t     act_sem, act_vcb, act_rq, act_pm;
  qpair_t   qp;
  tinfo_t   caller_i, tgt_i;
  pid_t     tgt;
  logic     tgt_ok;
  logic [3:0] grp;

  assign qp       = svc_queries(req.op, req.arg);
  assign q_obj[0] = qp.q0;
  assign q_obj[1] = qp.q1;
  assign tgt      = svc_target(req.op, req.arg);
  assign tgt_ok   = 32'(tgt) < NPROC;
  assign tgt_i    = tgt_ok ? tab[ix(tgt)] : '0;
  assign caller_i = (req.caller_valid && 32'(req.caller) < NPROC) ? tab[ix(req.caller)] : '0;
  assign grp      = req.op[7:4];

  always_comb begin
    req_sem = req;
    req_vcb = req;
    req_rq  = req;
    req_sem.valid = req.valid && grp == 4'h2;
    req_vcb.valid = req.valid && grp == 4'h3;
    req_rq.valid  = req.valid && grp == 4'h4;
  end

  rtu_sem #(.NSEM(NSEM), .SEM_MAX(SEM_MAX)) u_sem (
    .clk, .rst_n, .req(req_sem), .q0(q_res[0]), .act(act_sem));

  rtu_vcb #(.NSLOT(NSLOT), .DEPTH(DEPTH)) u_vcb (
    .clk, .rst_n, .req(req_vcb), .q0(q_res[0]), .q1(q_res[1]), .act(act_vcb));

  rtu_rq #(.NRQ(NRQ)) u_rq (
    .clk, .rst_n, .req(req_rq), .q0(q_res[0]), .q1(q_res[1]), .tgt(tgt_i),
    .caller_prio(caller_i.prio), .act(act_rq));

  // process management, time and signal services
  always_comb begin
    act_pm      = '0;
    act_pm.rcode = RC_OK;
    irq_consume = '0;
    case (req.op)
      OP_CREATE: begin
        if (!tgt_ok)                   act_pm.rcode = RC_NOT_OK;
        else if (tgt_i.st != T_DORMANT) act_pm.rcode = RC_EXISTS;
        else begin
          act_pm.pm     = PM_CREATE;
          act_pm.pm_pid = tgt;
          act_pm.pm_arg = req.arg;
        end
      end
      OP_TERMINATE, OP_SUSPEND, OP_SET_PRIO: begin
        if (!tgt_ok || tgt_i.st == T_DORMANT) act_pm.rcode = RC_NOT_CREATED;
        else begin
          act_pm.pm     = (req.op == OP_TERMINATE) ? PM_TERMINATE :
                          (req.op == OP_SUSPEND)   ? PM_SUSPEND   : PM_SET_PRIO;
          act_pm.pm_pid = tgt;
          act_pm.pm_arg = req.arg;
        end
      end
      OP_RESUME: begin
        if (!tgt_ok || tgt_i.st == T_DORMANT) act_pm.rcode = RC_NOT_CREATED;
        else if (tgt_i.st == T_SUSPENDED ||
                 (tgt_i.st == T_BLOCKED && tgt_i.wobj.kind == W_NONE)) begin
          act_pm.pm     = PM_RESUME;
          act_pm.pm_pid = tgt;
        end else act_pm.rcode = RC_NOT_OK;
      end
      OP_TASK_INFO: begin
        if (!tgt_ok) act_pm.rcode = RC_NOT_CREATED;
        else act_pm.rval = {tgt_i.st, tgt_i.ppend, tgt_i.aff, 3'd0, tgt_i.prio};
      end
      OP_DELAY: begin
        if (req.arg[15:0] != '0) begin
          act_pm.rcode = RC_BLOCKED;
          act_pm.block = 1'b1;
          act_pm.bpid  = req.caller;
          act_pm.bobj  = mk_obj(W_DELAY, 8'd0);
          act_pm.btmo  = req.arg[15:0];
        end
      end
      OP_SET_PERIOD: begin
        act_pm.pm     = PM_SET_PERIOD;
        act_pm.pm_pid = req.caller;
        act_pm.pm_arg = req.arg;
        if (!req.caller_valid) begin
          act_pm.pm    = PM_NONE;
          act_pm.rcode = RC_NOT_OK;
        end
      end
      OP_WAIT_PERIOD: begin
        if (caller_i.ppend) begin
          act_pm.pm     = PM_CLR_PPEND;
          act_pm.pm_pid = req.caller;
        end else begin
          act_pm.rcode = RC_BLOCKED;
          act_pm.block = 1'b1;
          act_pm.bpid  = req.caller;
          act_pm.bobj  = mk_obj(W_PERIOD, 8'd0);
        end
      end
      OP_WAIT_IRQ: begin
        if (32'(req.arg[1:0]) >= NIRQ) begin
          act_pm.rcode = RC_NOT_OK;
        end else if (irq_pending[req.arg[1:0]]) begin
          irq_consume[req.arg[1:0]] = req.valid;
        end else if (!req.caller_valid) begin
          act_pm.rcode = RC_NOT_OK;
        end else begin
          act_pm.rcode  = RC_BLOCKED;
          act_pm.pm     = PM_WAIT_IRQ;
          act_pm.pm_pid = req.caller;
          act_pm.pm_arg = req.arg;
        end
      end
      OP_SIG_SEND: begin
        if (!tgt_ok) act_pm.rcode = RC_NOT_CREATED;
        else if (q_res[0].found) begin
          act_pm.wake  = 1'b1;
          act_pm.wpid  = tgt;
          act_pm.wcode = RC_OK;
          act_pm.rval  = 16'd1;
        end
      end
      OP_SIG_RECV: begin
        act_pm.rcode = RC_BLOCKED;
        act_pm.block = 1'b1;
        act_pm.bpid  = req.caller;
        act_pm.bobj  = mk_obj(W_SIGNAL, 8'(req.caller));
        act_pm.btmo  = req.arg[15:0];
      end
      default: act_pm.rcode = RC_NOT_OK;
    endcase
  end

  always_comb begin
    case (grp)
      4'h2:    act = act_sem;
      4'h3:    act = act_vcb;
      4'h4:    act = act_rq;
      default: act = act_pm;
    endcase
    if (act.block && !req.caller_valid) begin
      act.block = 1'b0;
      act.pop   = P_NONE;
      act.rcode = RC_NOT_OK;
    end
    act_valid = req.valid;
  end

endmodule
