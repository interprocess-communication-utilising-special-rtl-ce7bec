// rtu_pkg -- types, codes and helper functions shared by the Real-Time Unit (RTU).
//
// The RTU is an RTOS co-processor: application CPUs hand it service calls through
// registers on a shared bus and it answers with return codes and process-switch
// interrupts. This package holds what the units agree on: process states, wait
// objects (what a blocked process waits for), service operation codes with their
// argument layouts, return codes, and the "action" record through which a unit
// tells the process table what to do with processes (block the caller, wake one
// waiter, change a priority, release all waiters of an object, process management).
//
// Following the document: six process states (running, ready, blocked, suspended,
// wait-for-interrupt and an unused/dormant state), up to three CPUs, 64 priority
// levels, 4 message priorities. The service word layout, the numeric codes and the
// 16-bit return value are this design's own choices.
package rtu_pkg;

  localparam int unsigned NCPU   = 3;   // application processors served
  localparam int unsigned PID_W  = 8;   // process id width (128 processes need 7)
  localparam int unsigned PRIO_W = 6;   // 64 priority levels, larger value = more urgent
  localparam int unsigned TMO_W  = 16;  // timeout / delay in clock ticks
  localparam int unsigned VAL_W  = 16;  // return value carried in the status register
  localparam int unsigned MPRIO_W = 2;  // 4 message priorities (VCB)

  typedef logic [PID_W-1:0]  pid_t;
  typedef logic [PRIO_W-1:0] prio_t;
  typedef logic [1:0]        cpu_t;

  typedef enum logic [2:0] {
    T_DORMANT   = 3'd0,  // not created / terminated
    T_READY     = 3'd1,
    T_RUNNING   = 3'd2,
    T_BLOCKED   = 3'd3,  // waiting on a wait object, possibly with a timeout
    T_SUSPENDED = 3'd4,
    T_WAIT_IRQ  = 3'd5   // interrupt process waiting for its external interrupt
  } tstate_e;

  typedef enum logic [3:0] {
    W_NONE     = 4'd0,
    W_DELAY    = 4'd1,
    W_PERIOD   = 4'd2,
    W_SEM      = 4'd3,
    W_RQ_TAKE  = 4'd4,
    W_RQ_GIVE  = 4'd5,
    W_VCB_GET  = 4'd6,
    W_VCB_PUT  = 4'd7,
    W_SIGNAL   = 4'd8
  } wkind_e;

  typedef struct packed {
    wkind_e     kind;
    logic [7:0] id;
  } wobj_t;

  typedef enum logic [3:0] {
    RC_OK          = 4'd0,
    RC_NOT_OK      = 4'd1,
    RC_NOT_CREATED = 4'd2,
    RC_WAITING     = 4'd3,   // object has waiting processes
    RC_NOT_FREE    = 4'd4,   // semaphore busy / queue empty, caller not waiting
    RC_MAX_VALUE   = 4'd5,
    RC_EMPTY       = 4'd6,
    RC_FULL        = 4'd7,
    RC_CLOSED      = 4'd8,
    RC_NOT_OWNER   = 4'd9,
    RC_WRONG_BUF   = 4'd10,
    RC_EXISTS      = 4'd11,  // already created / allocated
    RC_BLOCKED     = 4'd12,  // caller blocked: context switch follows
    RC_TIMEOUT     = 4'd13,
    RC_FLUSHED     = 4'd14,  // released by delete / flush / deallocate / kill
    RC_REJECTED    = 4'd15   // collision with a process-switch interrupt
  } rcode_e;

  typedef enum logic [7:0] {
    OP_NOP          = 8'h00,
    OP_END          = 8'h01,  // end_of_service
    // process management, signals, time
    OP_CREATE       = 8'h10,  // [7:0] pid [13:8] prio [15:14] init 0 ready/1 blocked/2 suspended [18:16] CPU mask (0 = any)
    OP_TERMINATE    = 8'h11,  // [7:0] pid
    OP_SUSPEND      = 8'h12,  // [7:0] pid
    OP_RESUME       = 8'h13,  // [7:0] pid
    OP_SET_PRIO     = 8'h14,  // [7:0] pid [13:8] prio
    OP_DELAY        = 8'h15,  // [15:0] ticks
    OP_SET_PERIOD   = 8'h16,  // [15:0] ticks, 0 = not periodic
    OP_WAIT_PERIOD  = 8'h17,
    OP_WAIT_IRQ     = 8'h18,  // [1:0] interrupt number
    OP_SIG_SEND     = 8'h19,  // [7:0] receiving pid
    OP_SIG_RECV     = 8'h1A,  // [15:0] timeout, 0 = forever
    OP_TASK_INFO    = 8'h1B,  // [7:0] pid
    // counting semaphores
    OP_SEM_CREATE   = 8'h20,  // [3:0] id [8:4] initial count
    OP_SEM_DELETE   = 8'h21,  // [3:0] id
    OP_SEM_PEND     = 8'h22,
    OP_SEM_RELEASE  = 8'h23,
    OP_SEM_READ     = 8'h24,
    // virtual communication bus
    OP_VCB_INIT     = 8'h30,
    OP_VCB_ALLOC    = 8'h31,  // [4:0] slot [10:5] default prio [11] prio order [12] prio inherit [13] owner check
    OP_VCB_DEALLOC  = 8'h32,  // [4:0] slot
    OP_VCB_OPEN     = 8'h33,
    OP_VCB_CLOSE    = 8'h34,
    OP_VCB_GET      = 8'h35,  // [4:0] slot [5] wait [21:6] timeout
    OP_VCB_GET_RDY  = 8'h36,  // [9:0] buffer reference {slot, entry}
    OP_VCB_PUT      = 8'h37,  // [4:0] slot [6:5] msg prio [7] wait [23:8] timeout
    OP_VCB_PUT_RDY  = 8'h38,  // [9:0] buffer reference
    OP_VCB_FLUSH    = 8'h39,
    OP_VCB_INFO     = 8'h3A,
    OP_VCB_SET_PINC = 8'h3B,  // [1:0] msg prio [7:2] task prio
    // resource queues (modified counting semaphores / message queues)
    OP_RQ_CREATE    = 8'h40,  // [7:0] max [15:8] init [16] prio inherit [17] prio order
    OP_RQ_DELETE    = 8'h41,  // [7:0] id [8] delete waiters (else activate)
    OP_RQ_FLUSH     = 8'h42,
    OP_RQ_TAKE      = 8'h43,  // [7:0] id [9:8] 0 no wait/1 forever/2 timed [23:10] timeout
    OP_RQ_GIVE      = 8'h44,
    OP_RQ_KILL      = 8'h45,  // [7:0] id [15:8] pid [16] delete (else activate)
    OP_RQ_READ      = 8'h46   // [7:0] id [9:8] 0 max/1 count/2 status
  } svc_op_e;

  typedef enum logic [1:0] {P_NONE, P_RAISE, P_RESTORE, P_SET} prio_op_e;

  typedef enum logic [3:0] {
    PM_NONE, PM_CREATE, PM_TERMINATE, PM_SUSPEND, PM_RESUME, PM_SET_PRIO,
    PM_SET_PERIOD, PM_CLR_PPEND, PM_WAIT_IRQ
  } pm_op_e;

  // one entry of the process table, as seen by the scheduler and the units
  typedef struct packed {
    tstate_e            st;
    prio_t              prio;    // current (possibly inherited) priority
    prio_t              base;    // priority given at creation / set_prio
    logic [NCPU-1:0]    aff;     // CPUs the process may run on
    cpu_t               cpu;     // CPU it runs on when RUNNING
    logic [31:0]        seq;     // time stamp: when it became ready or started waiting
    wobj_t              wobj;
    logic [TMO_W-1:0]   tmo;     // remaining timeout ticks, 0 = none
    logic [1:0]         irqn;
    logic               ppend;   // a period elapsed while it was not waiting
    rcode_e             wcode;   // why it was last made ready
    logic [VAL_W-1:0]   wval;    // value handed over when woken (e.g. buffer ref)
  } tinfo_t;

  // result of a waiter search on one wait object
  typedef struct packed {
    logic  found;
    pid_t  fifo_pid;   // longest waiting
    prio_t fifo_prio;
    pid_t  prio_pid;   // highest priority, longest waiting among equals
    prio_t prio_prio;
  } qres_t;

  typedef struct packed {
    logic        valid;
    cpu_t        cpu;
    logic        caller_valid;
    pid_t        caller;
    svc_op_e     op;
    logic [23:0] arg;
  } svc_req_t;

  // what a service does to the process table, plus the answer for the caller
  typedef struct packed {
    rcode_e           rcode;
    logic [VAL_W-1:0] rval;
    logic             block;   // caller bpid waits on bobj
    pid_t             bpid;
    wobj_t            bobj;
    logic [TMO_W-1:0] btmo;
    logic             wake;    // make waiter wpid ready
    pid_t             wpid;
    rcode_e           wcode;
    logic [VAL_W-1:0] wval;
    prio_op_e         pop;     // priority change of ppid
    pid_t             ppid;
    prio_t            pprio;
    logic             bcast;   // release every process waiting on bc0 or bc1
    wobj_t            bc0;
    wobj_t            bc1;
    logic             bkill;   // ... by terminating them instead
    pm_op_e           pm;
    pid_t             pm_pid;
    logic [23:0]      pm_arg;
  } act_t;

  typedef struct packed {
    wobj_t q0;
    wobj_t q1;
  } qpair_t;

  function automatic wobj_t mk_obj(wkind_e k, logic [7:0] id);
    wobj_t o;
    o.kind = k;
    o.id   = id;
    return o;
  endfunction

  // wait objects whose waiters a service must know about
  function automatic qpair_t svc_queries(svc_op_e op, logic [23:0] arg);
    qpair_t q;
    logic [7:0] slot;
    q.q0 = mk_obj(W_NONE, 8'd0);
    q.q1 = mk_obj(W_NONE, 8'd0);
    slot = (op == OP_VCB_GET_RDY || op == OP_VCB_PUT_RDY) ? {3'd0, arg[9:5]} : {3'd0, arg[4:0]};
    case (op)
      OP_SEM_CREATE, OP_SEM_DELETE, OP_SEM_PEND, OP_SEM_RELEASE, OP_SEM_READ:
        q.q0 = mk_obj(W_SEM, {4'd0, arg[3:0]});
      OP_RQ_CREATE, OP_RQ_DELETE, OP_RQ_FLUSH, OP_RQ_TAKE, OP_RQ_GIVE, OP_RQ_KILL, OP_RQ_READ: begin
        q.q0 = mk_obj(W_RQ_TAKE, arg[7:0]);
        q.q1 = mk_obj(W_RQ_GIVE, arg[7:0]);
      end
      OP_VCB_INIT, OP_VCB_ALLOC, OP_VCB_DEALLOC, OP_VCB_OPEN, OP_VCB_CLOSE, OP_VCB_GET,
      OP_VCB_GET_RDY, OP_VCB_PUT, OP_VCB_PUT_RDY, OP_VCB_FLUSH, OP_VCB_INFO, OP_VCB_SET_PINC: begin
        q.q0 = mk_obj(W_VCB_GET, slot);
        q.q1 = mk_obj(W_VCB_PUT, slot);
      end
      OP_SIG_SEND: q.q0 = mk_obj(W_SIGNAL, arg[7:0]);
      default: ;
    endcase
    return q;
  endfunction

  // process a service names in its argument (if any)
  function automatic pid_t svc_target(svc_op_e op, logic [23:0] arg);
    return (op == OP_RQ_KILL) ? arg[15:8] : arg[7:0];
  endfunction

  // "a is older than b" for wrapping 32-bit time stamps
  function automatic logic older(logic [31:0] a, logic [31:0] b);
    logic [31:0] d;
    d = a - b;
    return d[31];
  endfunction

endpackage
