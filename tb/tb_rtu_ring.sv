// tb_rtu_ring -- ring benchmark on the Real-Time Unit with three CPU models.
//
// The benchmark application of the RTU measurements passes work around rings of
// processes. Here two rings of four processes each pass one token apiece through
// counting semaphores: process k of a ring pends on its own semaphore, then releases
// the semaphore of process k+1. All eight processes may run on any CPU and have the
// same priority. The sizes are the one-CPU configuration's (16 processes, 16
// semaphores); the CPU count is the three-CPU configuration's.
//
// Three CPU models run concurrently and share the bus through the arbiter. Each
// one acts as a small kernel. It reads its status register, takes switch
// interrupts, and runs the process the RTU put on it. At end-of-service after a
// blocking pend, it follows the direct switch to the next process. When idle, it
// waits for an interrupt.
//
// Checks:
// - every process that holds a token was woken with OK, or took the semaphore at
//   once;
// - a ring never has two token holders;
// - each ring makes the required number of passes before the watchdog expires;
// - at the end, each ring's semaphore counts, its holders and its woken processes
//   that have not run yet add up to one token.
// Counted and required: switches by interrupt, direct switches, migrations of a
// process between CPUs, and work done on every CPU.
module tb_rtu_ring;
  import rtu_pkg::*;

  localparam int RINGS = 2;
  localparam int LEN   = 4;
  localparam int PASSES = 40;   // token passes per ring

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  addr;
  logic        we, re;
  logic [31:0] wdata, rdata;
  logic [2:0]  irq, bus_req, bus_gnt;
  logic [3:0]  ext_irq;
  logic        at_event, dbg_overflow;
  int checks = 0, failures = 0;

  int  step    [16];   // 0: next pends its semaphore, 1: holds the token
  bit  blocked [16];   // blocked in its pend, token arrives with the wake
  int  last_cpu[16];
  int  holders [RINGS];
  int  passes  [RINGS];
  int  n_irq_sw = 0, n_direct = 0, n_migrate = 0, n_coll = 0;
  int  work [3];
  bit  done = 1'b0;

  rtu_top #(.NPROC(16), .NIRQ(4), .NSEM(16), .SEM_MAX(16), .NSLOT(4), .DEPTH(4), .NRQ(8),
            .DBG_DEPTH(4), .TICK_DIV(4)) dut (
    .clk, .rst_n, .addr, .we, .re, .wdata, .rdata, .irq, .ext_irq, .bus_req, .bus_gnt,
    .at_event, .dbg_overflow);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (time %0t)", what, $time);
    end
  endtask

  // one bus access by CPU c, through the arbiter
  task automatic acc(int c, bit w, logic [7:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    bus_req[c] = 1'b1;
    while (!bus_gnt[c]) @(negedge clk);
    addr  = a;
    we    = w;
    re    = !w;
    wdata = d;
    #1;
    r = rdata;
    @(negedge clk);
    we = 1'b0;
    re = 1'b0;
    bus_req[c] = 1'b0;
  endtask

  function automatic logic [7:0] sr_a(int c);
    return 8'(8'h10 + 8'h20 * c);
  endfunction

  task automatic rd_sr(int c, output logic [31:0] s);
    acc(c, 1'b0, sr_a(c), '0, s);
  endtask

  task automatic svc(int c, svc_op_e op, logic [23:0] arg, output logic [31:0] s);
    logic [31:0] r;
    acc(c, 1'b1, sr_a(c) + 8'h04, {op, arg}, r);
    rd_sr(c, s);
  endtask

  task automatic svc_end(int c, output logic [31:0] s);
    logic [31:0] r;
    acc(c, 1'b1, sr_a(c) + 8'h04, {OP_END, 24'd0}, r);
    rd_sr(c, s);
  endtask

  task automatic ack_irq(int c);
    logic [31:0] r;
    acc(c, 1'b1, sr_a(c) + 8'h08, 32'd1, r);
  endtask

  function automatic int ring_of(int p);  return (p - 1) / LEN; endfunction
  function automatic int sem_of(int p);   return p - 1; endfunction
  function automatic int next_of(int p);
    return ring_of(p) * LEN + ((p - 1) % LEN + 1) % LEN + 1;
  endfunction

  // what the process p does next on CPU c; s is the status register just read
  task automatic run_step(int c, int p, logic [31:0] s);
    logic [31:0] r, e;
    int ring;
    ring = ring_of(p);
    if (last_cpu[p] >= 0 && last_cpu[p] != c) n_migrate++;
    last_cpu[p] = c;
    work[c]++;
    if (blocked[p]) begin
      // first run after the pend blocked: the token came with the wake
      blocked[p] = 1'b0;
      chk($sformatf("process %0d woken with OK", p), s[27:24] == 4'(RC_OK));
      holders[ring]++;
      chk($sformatf("one holder in ring %0d", ring), holders[ring] == 1);
      step[p] = 1;
      return;
    end
    if (step[p] == 0) begin
      svc(c, OP_SEM_PEND, 24'(sem_of(p)), r);
      if (r[30]) begin
        n_coll++;                    // rejected: take the switch, pend again later
        return;
      end
      chk("pend acknowledged", r[31]);
      if (r[28]) begin
        blocked[p] = 1'b1;
        svc_end(c, e);               // direct switch to the next process (or idle)
        n_direct++;
      end else begin
        svc_end(c, e);
        holders[ring]++;
        chk($sformatf("one holder in ring %0d", ring), holders[ring] == 1);
        step[p] = 1;
      end
    end else begin
      holders[ring]--;
      svc(c, OP_SEM_RELEASE, 24'(sem_of(next_of(p))), r);
      if (r[30]) begin
        holders[ring]++;
        n_coll++;
        return;
      end
      chk("release acknowledged", r[31] && r[27:24] == 4'(RC_OK));
      svc_end(c, e);
      passes[ring]++;
      step[p] = 0;
    end
  endtask

  task automatic cpu_loop(int c);
    logic [31:0] s;
    while (!done) begin
      if (irq[c]) begin
        ack_irq(c);
        n_irq_sw++;
      end
      rd_sr(c, s);
      if (s[29]) continue;
      if (s[7]) begin
        // idle: wait for the RTU to hand this CPU a process
        while (!irq[c] && !done) @(negedge clk);
        continue;
      end
      run_step(c, int'(s[6:0]), s);
      if (passes[0] >= PASSES && passes[1] >= PASSES) done = 1'b1;
    end
  endtask

  initial begin
    logic [31:0] s, e;
    addr = '0;
    we = 1'b0;
    re = 1'b0;
    wdata = '0;
    bus_req = '0;
    ext_irq = '0;
    for (int i = 0; i < 16; i++) begin
      step[i] = 0;
      blocked[i] = 1'b0;
      last_cpu[i] = -1;
    end
    for (int r = 0; r < RINGS; r++) begin
      holders[r] = 0;
      passes[r] = 0;
    end
    for (int c = 0; c < 3; c++) work[c] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // boot on CPU 0: semaphores first (the first of each ring holds the token),
    // then the processes, then end_of_service starts the first one
    for (int k = 0; k < RINGS * LEN; k++) begin
      svc(0, OP_SEM_CREATE, {15'd0, 5'((k % LEN == 0) ? 1 : 0), 4'(k)}, s);
      chk("semaphore created", s[31] && s[27:24] == 4'(RC_OK));
      svc_end(0, e);
    end
    fork
      cpu_loop(1);
      cpu_loop(2);
      begin
        for (int p = 1; p <= RINGS * LEN; p++) begin
          do begin
            if (irq[0]) ack_irq(0);
            svc(0, OP_CREATE, {5'd0, 3'b111, 2'd0, 6'd5, 8'(p)}, s);
          end while (s[30]);
          chk("process created", s[31] && s[27:24] == 4'(RC_OK));
          svc_end(0, e);
        end
        cpu_loop(0);
      end
    join

    // final state: every ring still holds exactly one token
    for (int r = 0; r < RINGS; r++) begin
      int tokens;
      tokens = holders[r];
      for (int k = 0; k < LEN; k++) begin
        do begin
          if (irq[0]) ack_irq(0);
          svc(0, OP_SEM_READ, 24'(r * LEN + k), s);
        end while (s[30]);
        tokens += int'(s[15:8]);   // value = {created, count}
        svc_end(0, e);
      end
      // a woken process that has not run yet carries the token with its wake
      for (int k = 0; k < LEN; k++) begin
        int p;
        p = r * LEN + k + 1;
        if (blocked[p]) begin
          do begin
            if (irq[0]) ack_irq(0);
            svc(0, OP_TASK_INFO, 24'(p), s);
          end while (s[30]);
          if (s[23:21] != 3'(T_BLOCKED)) tokens++;
          svc_end(0, e);
        end
      end
      chk($sformatf("ring %0d keeps one token", r), tokens == 1);
      chk($sformatf("ring %0d made %0d passes", r, PASSES), passes[r] >= PASSES);
    end
    chk("switches by interrupt", n_irq_sw > 0);
    chk("direct switches at end_of_service", n_direct > 0);
    chk("processes migrated between CPUs", n_migrate > 0);
    for (int c = 0; c < 3; c++) chk($sformatf("cpu %0d ran processes", c), work[c] > 0);
    $display("ring: passes %0d/%0d, irq switches %0d, direct %0d, migrations %0d, collisions %0d, work %0d/%0d/%0d, time %0t",
             passes[0], passes[1], n_irq_sw, n_direct, n_migrate, n_coll, work[0], work[1], work[2], $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
