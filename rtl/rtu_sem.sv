// rtu_sem -- counting semaphore unit (the single-CPU "Symo" configuration).
//
// NSEM counting semaphores, each holding a count from 0 to SEM_MAX and a created
// flag. Services (one per request, decided combinationally, state updated at the
// clock edge of the request):
//   create  id,init : OK, or NOT_OK when id is already in use (or init > SEM_MAX)
//   delete  id      : OK, NOT_CREATED, or WAITING when processes wait on it
//   pend    id      : count > 0 -> decrement, OK; count = 0 -> the caller blocks
//                     in the FIFO waiting queue of the semaphore (NOT_FREE)
//   release id      : a process waits -> the longest waiting one is made ready and
//                     receives the unit (count stays 0); otherwise increment, or
//                     MAX_VALUE when the count is already SEM_MAX
//   read    id      : rval = {created, count}
// rval returns the counter value after the call. The waiting queue itself lives in
// the process table; q0 is its search result for the addressed semaphore.
// Follows the document's primitive list; handing the unit straight to the woken
// process and the numeric codes are this design's choices.
// Lint note: the request and the waiter-search record are shared structures;
// only the fields a semaphore needs are read.
module rtu_sem
  import rtu_pkg::*;
#(
  parameter int unsigned NSEM    = 16,  // document: 16 semaphores
  parameter int unsigned SEM_MAX = 16   // document: count value up to 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  svc_req_t req,
  input  qres_t    q0,         // waiters on the addressed semaphore
  output act_t     act
);

  localparam int unsigned CW = $clog2(SEM_MAX + 1);
  localparam int unsigned IW = (NSEM > 1) ? $clog2(NSEM) : 1;

  logic [NSEM-1:0] created;
  logic [CW-1:0]   cnt [NSEM];

  logic [IW-1:0]   id;
  logic            id_ok;
  logic [4:0]      init;
  logic            set_created, clr_created, wr_cnt;
  logic [CW-1:0]   cnt_new;

  assign id    = req.arg[IW-1:0];
  assign id_ok = (32'(req.arg[3:0]) < NSEM);
  assign init  = req.arg[8:4];

  always_comb begin
    act         = '0;
    act.rcode   = RC_OK;
    set_created = 1'b0;
    clr_created = 1'b0;
    wr_cnt      = 1'b0;
    cnt_new     = cnt[id];
    if (req.valid) begin
      if (!id_ok) begin
        act.rcode = RC_NOT_CREATED;
      end else begin
        case (req.op)
          OP_SEM_CREATE: begin
            if (created[id] || 32'(init) > SEM_MAX) begin
              act.rcode = RC_NOT_OK;
            end else begin
              set_created = 1'b1;
              wr_cnt      = 1'b1;
              cnt_new     = CW'(init);
              act.rval    = VAL_W'(init);
            end
          end
          OP_SEM_DELETE: begin
            if (!created[id])  act.rcode = RC_NOT_CREATED;
            else if (q0.found) act.rcode = RC_WAITING;
            else               clr_created = 1'b1;
          end
          OP_SEM_PEND: begin
            if (!created[id]) begin
              act.rcode = RC_NOT_CREATED;
            end else if (cnt[id] != '0) begin
              wr_cnt   = 1'b1;
              cnt_new  = cnt[id] - 1'b1;
              act.rval = VAL_W'(cnt_new);
            end else begin
              act.rcode = RC_NOT_FREE;
              act.block = 1'b1;
              act.bpid  = req.caller;
              act.bobj  = mk_obj(W_SEM, 8'(id));
              act.btmo  = '0;
            end
          end
          OP_SEM_RELEASE: begin
            if (!created[id]) begin
              act.rcode = RC_NOT_CREATED;
            end else if (q0.found) begin
              act.wake  = 1'b1;
              act.wpid  = q0.fifo_pid;
              act.wcode = RC_OK;
              act.rval  = VAL_W'(cnt[id]);
            end else if (32'(cnt[id]) >= SEM_MAX) begin
              act.rcode = RC_MAX_VALUE;
              act.rval  = VAL_W'(cnt[id]);
            end else begin
              wr_cnt   = 1'b1;
              cnt_new  = cnt[id] + 1'b1;
              act.rval = VAL_W'(cnt_new);
            end
          end
          OP_SEM_READ: act.rval = VAL_W'({created[id], 8'(cnt[id])});
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      created <= '0;
      for (int i = 0; i < NSEM; i++) cnt[i] <= '0;
    end else begin
      if (set_created) created[id] <= 1'b1;
      if (clr_created) created[id] <= 1'b0;
      if (wr_cnt)      cnt[id]     <= cnt_new;
    end
  end

endmodule
