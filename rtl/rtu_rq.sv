// rtu_rq -- resource queues: modified counting semaphores for VxWorks IPC.
//
// One counter with a maximum serves as a counting semaphore (max large), a binary
// semaphore or mutex (max 1, optionally with priority inheritance) or the counter
// of a message queue (count = messages held, max = queue size). Each of the NRQ
// entries holds created, count, max, a priority-inheritance flag, the waiting order
// (FIFO or priority) and the last taker (owner, for inheritance). Processes can
// wait in two directions: takers wait while the count is 0 (busy semaphore / empty
// queue), givers wait while it is at max (overflowed semaphore / full queue).
//   create  max,init,pi,order -> rval = id of the first free entry, or NOT_OK
//   delete / flush id,kill    -> all waiters released (made ready with FLUSHED, or
//                                terminated when kill); delete also frees the id
//   take id,mode,timeout      -> count>0: a waiting giver is released and the count
//                                is unchanged, otherwise decrement; count=0: mode 0
//                                returns NOT_FREE, else the caller blocks (forever or
//                                for the timeout) and BLOCKED is returned. With
//                                inheritance the owner is raised to the caller's
//                                priority.
//   give id,mode,timeout      -> a waiting taker gets the unit directly; otherwise
//                                increment, or FULL (wait as for take); the owner
//                                giving back returns to its base priority
//   kill id,pid,kill          -> removes pid from the waiting queue (ready/terminate)
//   read id,which             -> max, count, or {takers waiting, givers waiting, created}
// The first waiter is the longest waiting or the most urgent, per the entry's order.
// Follows the document's primitive list; encodings and the hand-over of the unit to
// the released process are this design's choices.
// Lint note: the waiter-search results, the request and the target process
// entry are shared records; this unit reads only the fields it needs.
module rtu_rq
  import rtu_pkg::*;
#(
  parameter int unsigned NRQ = 256   // document: 256 counting semaphores
) (
  input  logic     clk,
  input  logic     rst_n,
  input  svc_req_t req,
  input  qres_t    q0,      // takers waiting on the addressed entry
  input  qres_t    q1,      // givers waiting on the addressed entry
  input  tinfo_t   tgt,     // process table entry of the pid named by kill
  input  prio_t    caller_prio,
  output act_t     act
);

  localparam int unsigned IW = (NRQ > 1) ? $clog2(NRQ) : 1;

  typedef struct packed {
    logic       created;
    logic [7:0] cnt;
    logic [7:0] max;
    logic       pi;
    logic       porder;
    logic       own_v;
    pid_t       owner;
  } rq_t;

  rq_t         rq [NRQ];
  rq_t         e, e_new;
  logic        wr;
  logic [IW-1:0] id, wid, free_id;
  logic        free_found;
  logic        id_ok;
  logic [1:0]  mode;
  logic [TMO_W-1:0] tmo;
  pid_t        first_taker, first_giver;

  assign id    = req.arg[IW-1:0];
  assign id_ok = (32'(req.arg[7:0]) < NRQ);
  assign mode  = req.arg[9:8];
  assign tmo   = TMO_W'(req.arg[23:10]);
  assign e     = rq[id];
  assign first_taker = e.porder ? q0.prio_pid : q0.fifo_pid;
  assign first_giver = e.porder ? q1.prio_pid : q1.fifo_pid;

  always_comb begin
    free_found = 1'b0;
    free_id    = '0;
    for (int i = NRQ - 1; i >= 0; i--)
      if (!rq[i].created) begin
        free_found = 1'b1;
        free_id    = IW'(i);
      end
  end

  always_comb begin
    act       = '0;
    act.rcode = RC_OK;
    wr        = 1'b0;
    wid       = id;
    e_new     = e;
    if (req.valid) begin
      if (req.op == OP_RQ_CREATE) begin
        if (!free_found || req.arg[15:8] > req.arg[7:0]) begin
          act.rcode = RC_NOT_OK;
        end else begin
          wr             = 1'b1;
          wid            = free_id;
          e_new          = '0;
          e_new.created  = 1'b1;
          e_new.max      = req.arg[7:0];
          e_new.cnt      = req.arg[15:8];
          e_new.pi       = req.arg[16];
          e_new.porder   = req.arg[17];
          act.rval       = VAL_W'(free_id);
        end
      end else if (!id_ok || !e.created) begin
        act.rcode = RC_NOT_CREATED;
      end else begin
        case (req.op)
          OP_RQ_DELETE, OP_RQ_FLUSH: begin
            act.bcast = 1'b1;
            act.bc0   = mk_obj(W_RQ_TAKE, 8'(id));
            act.bc1   = mk_obj(W_RQ_GIVE, 8'(id));
            act.bkill = req.arg[8];
            if (e.pi && e.own_v) begin
              act.pop  = P_RESTORE;
              act.ppid = e.owner;
            end
            wr          = 1'b1;
            e_new.own_v = 1'b0;
            if (req.op == OP_RQ_DELETE) e_new.created = 1'b0;
          end
          OP_RQ_TAKE: begin
            if (e.cnt != '0) begin
              wr          = 1'b1;
              e_new.own_v = 1'b1;
              e_new.owner = req.caller;
              if (q1.found) begin
                act.wake  = 1'b1;      // a blocked giver completes its give
                act.wpid  = first_giver;
                act.wcode = RC_OK;
                act.rval  = VAL_W'(e.cnt);
              end else begin
                e_new.cnt = e.cnt - 1'b1;
                act.rval  = VAL_W'(e_new.cnt);
              end
            end else if (mode == 2'd0 || (mode == 2'd2 && tmo == '0)) begin
              act.rcode = RC_NOT_FREE;
            end else begin
              act.rcode = RC_BLOCKED;
              act.block = 1'b1;
              act.bpid  = req.caller;
              act.bobj  = mk_obj(W_RQ_TAKE, 8'(id));
              act.btmo  = (mode == 2'd2) ? tmo : '0;
              if (e.pi && e.own_v) begin
                act.pop   = P_RAISE;
                act.ppid  = e.owner;
                act.pprio = caller_prio;
              end
            end
          end
          OP_RQ_GIVE: begin
            if (e.pi && e.own_v && e.owner == req.caller) begin
              act.pop  = P_RESTORE;
              act.ppid = req.caller;
            end
            if (q0.found) begin
              act.wake    = 1'b1;        // the unit goes straight to the first taker
              act.wpid    = first_taker;
              act.wcode   = RC_OK;
              act.rval    = VAL_W'(e.cnt);
              wr          = 1'b1;
              e_new.own_v = 1'b1;
              e_new.owner = first_taker;
            end else if (e.cnt < e.max) begin
              wr        = 1'b1;
              e_new.cnt = e.cnt + 1'b1;
              if (e.owner == req.caller) e_new.own_v = 1'b0;
              act.rval  = VAL_W'(e_new.cnt);
            end else if (mode == 2'd0 || (mode == 2'd2 && tmo == '0)) begin
              act.rcode = RC_FULL;
              act.rval  = VAL_W'(e.cnt);
            end else begin
              act.rcode = RC_BLOCKED;
              act.block = 1'b1;
              act.bpid  = req.caller;
              act.bobj  = mk_obj(W_RQ_GIVE, 8'(id));
              act.btmo  = (mode == 2'd2) ? tmo : '0;
            end
          end
          OP_RQ_KILL: begin
            if (tgt.st == T_BLOCKED &&
                (tgt.wobj == mk_obj(W_RQ_TAKE, 8'(id)) || tgt.wobj == mk_obj(W_RQ_GIVE, 8'(id)))) begin
              if (req.arg[16]) begin
                act.pm     = PM_TERMINATE;
                act.pm_pid = req.arg[15:8];
              end else begin
                act.wake  = 1'b1;
                act.wpid  = req.arg[15:8];
                act.wcode = RC_FLUSHED;
              end
            end else begin
              act.rcode = RC_NOT_OK;
            end
          end
          OP_RQ_READ: begin
            case (req.arg[9:8])
              2'd0:    act.rval = VAL_W'(e.max);
              2'd1:    act.rval = VAL_W'(e.cnt);
              default: act.rval = VAL_W'({q0.found, q1.found, e.created});
            endcase
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NRQ; i++) rq[i] <= '0;
    end else if (wr) begin
      rq[wid] <= e_new;
    end
  end

endmodule
