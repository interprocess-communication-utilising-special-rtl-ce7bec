// rtu_vcb -- Virtual Communication Bus: message-queue "slots" for asynchronous IPC.
//
// A process allocates a slot (it becomes the slot's owner) and other processes post
// messages to it, like boards on a backplane bus. The message data stays in the
// CPUs' memory; the slot keeps only, for each of its DEPTH places, a buffer
// reference ({slot, place}, which software maps to a buffer address), the message
// priority (0..3) and the place's state: free, allocated by put (being copied),
// ready (put_ready done) or taken by get (being read). Sending is put -> copy ->
// put_ready, receiving is get -> copy -> get_ready, so buffers are handed out and
// returned under RTU control.
//   init            : all slots free
//   allocate        : slot, default priority, FIFO/priority order, priority
//                     inheritance, owner check -> EXISTS if already allocated
//   deallocate      : owner only; frees the slot and releases waiters (FLUSHED)
//   open / close    : enable / disable put; rval = messages in the slot, counting
//                     those not yet put_ready (so none is lost before deallocate)
//   get  slot,wait  : rval = reference of the first ready message (highest priority
//                     then oldest in a priority slot, oldest in a FIFO slot); empty:
//                     EMPTY, or the caller blocks (with timeout) and is later handed
//                     the next message put_ready to the slot (wake value = ref)
//   get_ready ref   : frees the place; rval = ready messages left; a sender blocked
//                     on the full slot is released to retry its put
//   put slot,prio   : rval = reference of a free place; CLOSED, or FULL (or the
//                     caller blocks). The last free place is kept for messages of the
//                     highest priority, so an urgent message can always get in.
//   put_ready ref   : message becomes visible; with inheritance the owner's priority
//                     is raised to pinc[message priority]
//   flush           : owner only; empties the slot
//   info            : rval = {alloc, open, order, inherit, default prio[5:0], count[5:0]}
//   set_pinc        : writes the message-priority -> process-priority (pinc) table
// After get_ready of an inheriting slot the owner's priority becomes the larger of
// its default priority and pinc of the most urgent message still ready.
// Follows the document's primitives, the pinc table (reset contents are the
// document's example), get_ready returning the number of messages left, close
// counting unfinished messages, and the reserved last place. The reference format,
// hand-over of a message to a blocked receiver and retry by a released sender are
// this design's choices. Message age uses 16-bit wrapping time stamps.
// Lint note: the request and the waiter-search records are shared structures;
// only the fields the VCB needs are read.
module rtu_vcb
  import rtu_pkg::*;
#(
  parameter int unsigned NSLOT = 32,    // document: 32 slots
  parameter int unsigned DEPTH = 28,    // document: 28 message references per slot
  parameter bit          RESERVE_LAST = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  svc_req_t req,
  input  qres_t    q0,      // receivers waiting on the addressed slot
  input  qres_t    q1,      // senders waiting on the addressed slot
  output act_t     act
);

  localparam int unsigned SW = (NSLOT > 1) ? $clog2(NSLOT) : 1;
  localparam int unsigned EW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [1:0] {E_FREE, E_ALLOC, E_READY, E_TAKEN} est_e;

  typedef struct packed {
    logic  alloc;
    logic  open;
    pid_t  owner;
    prio_t defprio;
    logic  porder;
    logic  pi;
    logic  ochk;
  } slot_t;

  slot_t                slots [NSLOT];
  est_e                 est   [NSLOT][DEPTH];
  logic [MPRIO_W-1:0]   emp   [NSLOT][DEPTH];
  logic [15:0]          estmp [NSLOT][DEPTH];
  prio_t                pinc  [4];
  logic [15:0]          stamp;

  // addressed slot and place
  logic          isref;
  logic [4:0]    sraw;
  logic [4:0]    eraw;
  logic [SW-1:0] s;
  logic [EW-1:0] ei;
  logic          s_ok, e_ok;
  slot_t         sl;

  assign isref = (req.op == OP_VCB_GET_RDY || req.op == OP_VCB_PUT_RDY);
  assign sraw  = isref ? req.arg[9:5] : req.arg[4:0];
  assign eraw  = req.arg[4:0];
  assign s     = SW'(sraw);
  assign ei    = EW'(eraw);
  assign s_ok  = 32'(sraw) < NSLOT;
  assign e_ok  = 32'(eraw) < DEPTH;
  assign sl    = slots[s];

  // scan of the addressed slot
  logic          best_found;
  logic [EW-1:0] best_e;
  logic [MPRIO_W-1:0] best_p;
  logic          free_found;
  logic [EW-1:0] free_e;
  logic [6:0]    n_occ, n_ready, n_free;

  always_comb begin
    logic [15:0] bstmp;
    logic [15:0] d;
    logic        d_older;
    d          = '0;
    d_older    = 1'b0;
    best_found = 1'b0;
    best_e     = '0;
    best_p     = '0;
    bstmp      = '0;
    free_found = 1'b0;
    free_e     = '0;
    n_occ      = '0;
    n_ready    = '0;
    n_free     = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (est[s][i] == E_FREE) begin
        n_free = n_free + 1'b1;
        if (!free_found) begin
          free_found = 1'b1;
          free_e     = EW'(i);
        end
      end else begin
        n_occ = n_occ + 1'b1;
      end
      if (est[s][i] == E_READY) begin
        d       = estmp[s][i] - bstmp;
        d_older = d[15];
        n_ready = n_ready + 1'b1;
        if (!best_found ||
            (sl.porder && emp[s][i] > best_p) ||
            ((!sl.porder || emp[s][i] == best_p) && d_older)) begin
          best_found = 1'b1;
          best_e     = EW'(i);
          best_p     = emp[s][i];
          bstmp      = estmp[s][i];
        end
      end
    end
  end

  // decision
  logic                 clr_all, clr_slot, slot_wr, e_wr, pinc_wr, stamp_inc;
  slot_t                slot_new;
  logic [EW-1:0]        e_idx;
  est_e                 e_st;
  logic [MPRIO_W-1:0]   e_mp;
  logic [VAL_W-1:0]     ref_best, ref_free, ref_arg;
  prio_t                pi_after_get;
  logic [6:0]           ready_left;

  assign ref_best = VAL_W'({sraw, 5'(best_e)});
  assign ref_free = VAL_W'({sraw, 5'(free_e)});
  assign ref_arg  = VAL_W'(req.arg[9:0]);

  always_comb begin
    // highest remaining message after a get_ready (the taken one is no longer ready)
    pi_after_get = sl.defprio;
    if (best_found && pinc[best_p] > sl.defprio) pi_after_get = pinc[best_p];
    ready_left = n_ready;
  end

  always_comb begin
    act       = '0;
    act.rcode = RC_OK;
    clr_all   = 1'b0;
    clr_slot  = 1'b0;
    slot_wr   = 1'b0;
    slot_new  = sl;
    e_wr      = 1'b0;
    e_idx     = ei;
    e_st      = E_FREE;
    e_mp      = '0;
    pinc_wr   = 1'b0;
    stamp_inc = 1'b0;
    if (req.valid) begin
      if (req.op == OP_VCB_INIT) begin
        clr_all = 1'b1;
      end else if (req.op == OP_VCB_SET_PINC) begin
        pinc_wr = 1'b1;
      end else if (!s_ok) begin
        act.rcode = RC_NOT_CREATED;
      end else if (req.op == OP_VCB_ALLOC) begin
        if (sl.alloc) begin
          act.rcode = RC_EXISTS;
        end else begin
          slot_wr          = 1'b1;
          clr_slot         = 1'b1;
          slot_new.alloc   = 1'b1;
          slot_new.open    = 1'b1;
          slot_new.owner   = req.caller;
          slot_new.defprio = req.arg[10:5];
          slot_new.porder  = req.arg[11];
          slot_new.pi      = req.arg[12];
          slot_new.ochk    = req.arg[13];
        end
      end else if (!sl.alloc) begin
        act.rcode = RC_NOT_CREATED;
      end else begin
        case (req.op)
          OP_VCB_DEALLOC: begin
            if (sl.owner != req.caller) begin
              act.rcode = RC_NOT_OWNER;
            end else begin
              slot_wr        = 1'b1;
              clr_slot       = 1'b1;
              slot_new.alloc = 1'b0;
              slot_new.open  = 1'b0;
              act.bcast      = 1'b1;
              act.bc0        = mk_obj(W_VCB_GET, 8'(sraw));
              act.bc1        = mk_obj(W_VCB_PUT, 8'(sraw));
            end
          end
          OP_VCB_OPEN, OP_VCB_CLOSE: begin
            slot_wr       = 1'b1;
            slot_new.open = (req.op == OP_VCB_OPEN);
            act.rval      = VAL_W'(n_occ);
          end
          OP_VCB_GET: begin
            if (sl.ochk && sl.owner != req.caller) begin
              act.rcode = RC_NOT_OWNER;
            end else if (best_found) begin
              e_wr     = 1'b1;
              e_idx    = best_e;
              e_st     = E_TAKEN;
              e_mp     = best_p;
              act.rval = ref_best;
            end else if (req.arg[5]) begin
              act.rcode = RC_BLOCKED;
              act.block = 1'b1;
              act.bpid  = req.caller;
              act.bobj  = mk_obj(W_VCB_GET, 8'(sraw));
              act.btmo  = req.arg[21:6];
            end else begin
              act.rcode = RC_EMPTY;
            end
          end
          OP_VCB_GET_RDY: begin
            if (!e_ok || est[s][ei] != E_TAKEN) begin
              act.rcode = RC_WRONG_BUF;
            end else begin
              e_wr     = 1'b1;
              e_st     = E_FREE;
              act.rval = VAL_W'(ready_left);
              if (q1.found) begin
                act.wake  = 1'b1;
                act.wpid  = q1.fifo_pid;
                act.wcode = RC_OK;
              end
              if (sl.pi) begin
                act.pop   = P_SET;
                act.ppid  = sl.owner;
                act.pprio = pi_after_get;
              end
            end
          end
          OP_VCB_PUT: begin
            if (!sl.open) begin
              act.rcode = RC_CLOSED;
            end else if (!free_found ||
                         (RESERVE_LAST && n_free == 7'd1 && req.arg[6:5] != '1)) begin
              if (req.arg[7]) begin
                act.rcode = RC_BLOCKED;
                act.block = 1'b1;
                act.bpid  = req.caller;
                act.bobj  = mk_obj(W_VCB_PUT, 8'(sraw));
                act.btmo  = req.arg[23:8];
              end else begin
                act.rcode = RC_FULL;
              end
            end else begin
              e_wr     = 1'b1;
              e_idx    = free_e;
              e_st     = E_ALLOC;
              e_mp     = req.arg[6:5];
              act.rval = ref_free;
            end
          end
          OP_VCB_PUT_RDY: begin
            if (!e_ok || est[s][ei] != E_ALLOC) begin
              act.rcode = RC_WRONG_BUF;
            end else begin
              e_wr      = 1'b1;
              e_mp      = emp[s][ei];
              stamp_inc = 1'b1;
              if (q0.found) begin
                e_st      = E_TAKEN;       // handed straight to the waiting receiver
                act.wake  = 1'b1;
                act.wpid  = q0.fifo_pid;
                act.wcode = RC_OK;
                act.wval  = ref_arg;
              end else begin
                e_st = E_READY;
              end
              if (sl.pi) begin
                act.pop   = P_RAISE;
                act.ppid  = sl.owner;
                act.pprio = (pinc[emp[s][ei]] > sl.defprio) ? pinc[emp[s][ei]] : sl.defprio;
              end
            end
          end
          OP_VCB_FLUSH: begin
            if (sl.owner != req.caller) begin
              act.rcode = RC_NOT_OWNER;
            end else begin
              clr_slot  = 1'b1;
              act.bcast = 1'b1;
              act.bc0   = mk_obj(W_VCB_PUT, 8'(sraw));
              act.bc1   = mk_obj(W_VCB_PUT, 8'(sraw));
              if (sl.pi) begin
                act.pop   = P_SET;
                act.ppid  = sl.owner;
                act.pprio = sl.defprio;
              end
            end
          end
          OP_VCB_INFO:
            act.rval = {sl.alloc, sl.open, sl.porder, sl.pi, sl.defprio, 6'(n_occ)};
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) begin
        slots[i] <= '0;
        for (int j = 0; j < DEPTH; j++) begin
          est[i][j]   <= E_FREE;
          emp[i][j]   <= '0;
          estmp[i][j] <= '0;
        end
      end
      pinc[0] <= prio_t'(3);
      pinc[1] <= prio_t'(3);
      pinc[2] <= prio_t'(4);
      pinc[3] <= prio_t'(5);
      stamp   <= '0;
    end else begin
      if (clr_all) begin
        for (int i = 0; i < NSLOT; i++) begin
          slots[i] <= '0;
          for (int j = 0; j < DEPTH; j++) est[i][j] <= E_FREE;
        end
      end
      if (clr_slot)
        for (int j = 0; j < DEPTH; j++) est[s][j] <= E_FREE;
      if (slot_wr) slots[s] <= slot_new;
      if (e_wr) begin
        est[s][e_idx] <= e_st;
        emp[s][e_idx] <= e_mp;
        if (stamp_inc) estmp[s][e_idx] <= stamp;
      end
      if (stamp_inc) stamp <= stamp + 1'b1;
      if (pinc_wr) pinc[req.arg[1:0]] <= req.arg[7:2];
    end
  end

endmodule
