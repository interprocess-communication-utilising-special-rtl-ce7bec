// rtu_bus_if -- register interface of the RTU on the CPUs' shared bus.
//
// Register map (32-bit registers, byte offsets, as in the document's table for a
// three-CPU RTU; n = 0,1,2 for CPU 1,2,3):
//   $00 RTUVR  R   version            $04 RTUTCR R  time counter (ticks)
//   $24 TOTR   R/W cycles per tick    $28 ATDR   R/W absolute timer reload
//   $2C ATCR   R   absolute timer     $08 DBGR   R  debug trace word (read pops)
//   $10+$20n   CPUnSR   R   status    $14+$20n CPUnSVCR R/W service request
//   $18+$20n   CPUnCR   R/W control   $20+$20n RRTRn    R/W round-robin slice
// Status register: [31] service acknowledge, [30] collision, [29] process-switch
// interrupt pending, [28] caller blocked (switch to the process below), [27:24]
// return code, [23:8] return value, [7] no process (CPU idle), [6:0] process id.
// Control register: [0] interrupt acknowledge, [1] disable process switch.
// Service word: [31:24] operation, [23:0] argument (see rtu_pkg).
//
// Service request (per CPU): the CPU writes the service into SVCR; the RTU executes
// it in that same cycle and, from the next cycle, SR shows acknowledge=1 with the
// return code and value; process switching on that CPU is disabled meanwhile. The
// CPU then writes end_of_service (operation $01); acknowledge drops and, if the
// caller was blocked, terminated or suspended by the service, the RTU puts the
// process chosen by the scheduler straight into SR (id, and the code and value it
// was woken with) -- the CPU switches to it without an interrupt.
// Process switch: when the scheduler's choice for a CPU differs from the process it
// runs, and the CPU is not inside a service and has not disabled switching, the RTU
// raises that CPU's interrupt. The CPU acknowledges through CR[0]; the RTU then
// drops the interrupt, makes the chosen process running and shows it in SR. A
// service written while the interrupt is pending collides: it is not executed, SR
// shows collision and REJECTED, and the CPU repeats it after the switch.
// Also: round-robin yield flags (set when a CPU's slice expires, cleared when it
// switches) and the read strobe of the debug FIFO.
// The register names and offsets, both protocols and the collision rule follow the
// document; bit positions, the DBGR register and the direct switch at
// end_of_service are this design's choices. One bus access per cycle, rdata is
// combinational.
// Lint note: only the blocking and wake fields of the action record matter here;
// the remaining fields are consumed by the process table.
module rtu_bus_if
  import rtu_pkg::*;
#(
  parameter int unsigned NPROC    = 128,
  parameter logic [31:0] VERSION  = 32'h0000_0104,
  parameter logic [31:0] TICK_DIV = 32'd50       // reset value of TOTR
) (
  input  logic            clk,
  input  logic            rst_n,
  // shared bus
  input  logic [7:0]      addr,
  input  logic            we,
  input  logic            re,
  input  logic [31:0]     wdata,
  output logic [31:0]     rdata,
  output logic [NCPU-1:0] irq,
  // service dispatcher
  output svc_req_t        req,
  input  act_t            act,
  // process table and scheduler
  input  tinfo_t          tab [NPROC],
  input  logic [NCPU-1:0] nxt_valid,
  input  pid_t            nxt_pid [NCPU],
  output logic            sw_valid,
  output cpu_t            sw_cpu,
  output logic            sw_new_valid,
  output pid_t            sw_new,
  output logic [NCPU-1:0] sw_pulse,
  output logic [NCPU-1:0] yield,
  // timer
  output logic [31:0]     totr,
  output logic [31:0]     atdr,
  output logic [15:0]     rrtr [NCPU],
  input  logic [31:0]     tcr,
  input  logic [31:0]     atcr,
  input  logic [NCPU-1:0] rr_expire,
  // debug trace
  output logic            dbg_rd,
  input  logic [31:0]     dbg_data
);

  // Table index of a pid. Pids are PID_W bits on every interface; ids at or above
  // NPROC are refused by the dispatcher before they are used as an index.
  localparam int unsigned XW = (NPROC > 1) ? $clog2(NPROC) : 1;
  function automatic logic [XW-1:0] ix(pid_t p);
    return p[XW-1:0];
  endfunction

  typedef struct packed {
    logic             ack;
    logic             coll;
    logic             blk;
    rcode_e           rcode;
    logic [VAL_W-1:0] rval;
  } sr_t;

  logic [NCPU-1:0] cur_valid, insvc, cur_running, need_sw;
  pid_t            cur_pid [NCPU];
  sr_t             sr [NCPU];
  logic [1:0]      cr [NCPU];
  logic [31:0]     svcr [NCPU];

  // address decode
  logic        a_cpu;      // one of the per-CPU blocks
  cpu_t        a_n;
  logic [4:0]  a_off;
  always_comb begin
    a_cpu = 1'b0;
    a_n   = '0;
    a_off = addr[4:0];
    if (addr >= 8'h10 && addr <= 8'h1F)      begin a_cpu = 1'b1; a_n = 2'd0; end
    else if (addr >= 8'h30 && addr <= 8'h3F) begin a_cpu = 1'b1; a_n = 2'd1; end
    else if (addr >= 8'h50 && addr <= 8'h5F) begin a_cpu = 1'b1; a_n = 2'd2; end
  end

  logic w_svc, w_cr, is_end;
  svc_op_e w_op;
  assign w_op   = svc_op_e'(wdata[31:24]);
  assign w_svc  = we && a_cpu && a_off == 5'h14;
  assign w_cr   = we && a_cpu && a_off == 5'h18;
  assign is_end = (w_op == OP_END);

  for (genvar c = 0; c < NCPU; c++) begin : g_cur
    assign cur_running[c] = cur_valid[c] && 32'(cur_pid[c]) < NPROC &&
                            tab[ix(cur_pid[c])].st == T_RUNNING && tab[ix(cur_pid[c])].cpu == cpu_t'(c);
    assign need_sw[c] = cur_valid[c] ? (!cur_running[c] || !nxt_valid[c] || nxt_pid[c] != cur_pid[c])
                                     : nxt_valid[c];
  end

  // service request towards the dispatcher (executed in this cycle)
  always_comb begin
    req              = '0;
    req.valid        = w_svc && !is_end && !irq[a_n] && !insvc[a_n] && w_op != OP_NOP;
    req.cpu          = a_n;
    req.caller_valid = cur_running[a_n];
    req.caller       = cur_pid[a_n];
    req.op           = w_op;
    req.arg          = wdata[23:0];
  end

  // process switches: at end_of_service of a caller that no longer runs, or at an
  // interrupt acknowledge
  logic do_sw;
  always_comb begin
    do_sw = 1'b0;
    if (w_svc && is_end && insvc[a_n] && !cur_running[a_n]) do_sw = 1'b1;
    if (w_cr && wdata[0] && irq[a_n])                       do_sw = 1'b1;
    sw_valid     = do_sw;
    sw_cpu       = a_n;
    sw_new_valid = nxt_valid[a_n];
    sw_new       = nxt_pid[a_n];
    sw_pulse     = '0;
    if (do_sw) sw_pulse[a_n] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCPU; c++) begin
        cur_pid[c] <= '0;
        sr[c]      <= '0;
        cr[c]      <= '0;
        svcr[c]    <= '0;
        rrtr[c]    <= '0;
      end
      cur_valid <= '0;
      insvc     <= '0;
      irq       <= '0;
      yield     <= '0;
      totr      <= TICK_DIV;
      atdr      <= '0;
    end else begin
      yield <= yield | rr_expire;
      // raise process-switch interrupts
      for (int c = 0; c < NCPU; c++)
        if (!irq[c] && !insvc[c] && !cr[c][1] && need_sw[c] && !(do_sw && a_n == cpu_t'(c)))
          irq[c] <= 1'b1;
      if (we) begin
        case (addr)
          8'h24: totr <= wdata;
          8'h28: atdr <= wdata;
          8'h20: rrtr[0] <= wdata[15:0];
          8'h40: rrtr[1] <= wdata[15:0];
          8'h60: rrtr[2] <= wdata[15:0];
          default: ;
        endcase
      end
      if (w_svc) begin
        svcr[a_n] <= wdata;
        if (is_end) begin
          if (insvc[a_n]) begin
            insvc[a_n]  <= 1'b0;
            sr[a_n].ack <= 1'b0;
            sr[a_n].blk <= 1'b0;
          end
        end else if (w_op == OP_NOP) begin
          // nothing
        end else if (irq[a_n]) begin
          sr[a_n].coll  <= 1'b1;
          sr[a_n].rcode <= RC_REJECTED;
        end else if (insvc[a_n]) begin
          sr[a_n].rcode <= RC_REJECTED;
        end else begin
          insvc[a_n]    <= 1'b1;
          sr[a_n].ack   <= 1'b1;
          sr[a_n].rcode <= act.rcode;
          sr[a_n].rval  <= act.rval;
          sr[a_n].blk   <= cur_running[a_n] &&
                           ((act.block && act.bpid == cur_pid[a_n]) ||
                            (act.pm inside {PM_TERMINATE, PM_SUSPEND, PM_WAIT_IRQ} &&
                             act.pm_pid == cur_pid[a_n]));
        end
      end
      if (w_cr) begin
        cr[a_n] <= wdata[1:0];
        if (wdata[0] && irq[a_n]) begin
          irq[a_n]     <= 1'b0;
          sr[a_n].coll <= 1'b0;
        end
      end
      if (do_sw) begin
        cur_valid[a_n] <= nxt_valid[a_n];
        cur_pid[a_n]   <= nxt_pid[a_n];
        yield[a_n]     <= 1'b0;
        if (nxt_valid[a_n] && 32'(nxt_pid[a_n]) < NPROC) begin
          sr[a_n].rcode <= tab[ix(nxt_pid[a_n])].wcode;
          sr[a_n].rval  <= tab[ix(nxt_pid[a_n])].wval;
        end else begin
          sr[a_n].rcode <= RC_OK;
          sr[a_n].rval  <= '0;
        end
      end
    end
  end

  // read mux
  always_comb begin
    rdata  = '0;
    dbg_rd = re && addr == 8'h08;
    if (a_cpu) begin
      case (a_off)
        5'h10: rdata = {sr[a_n].ack, sr[a_n].coll, irq[a_n], sr[a_n].blk, sr[a_n].rcode,
                        sr[a_n].rval, !cur_valid[a_n], cur_pid[a_n][6:0]};
        5'h14: rdata = svcr[a_n];
        5'h18: rdata = {30'd0, cr[a_n]};
        default: ;
      endcase
    end else begin
      case (addr)
        8'h00: rdata = VERSION;
        8'h04: rdata = tcr;
        8'h08: rdata = dbg_data;
        8'h20: rdata = {16'd0, rrtr[0]};
        8'h24: rdata = totr;
        8'h28: rdata = atdr;
        8'h2C: rdata = atcr;
        8'h40: rdata = {16'd0, rrtr[1]};
        8'h60: rdata = {16'd0, rrtr[2]};
        default: ;
      endcase
    end
  end

  // a CPU inside a service is never interrupted for a process switch
  for (genvar c = 0; c < NCPU; c++) begin : g_chk
    a_no_irq_in_svc: assert property (@(posedge clk) disable iff (!rst_n)
      (insvc[c] && !irq[c]) |=> !irq[c]);
  end

endmodule
