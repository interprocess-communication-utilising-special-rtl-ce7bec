// rtu_scheduler -- priority-preemptive scheduler for up to three CPUs.
//
// Purely combinational: from the process table it chooses, for every CPU, the
// process that should be running there. A candidate for CPU c is a ready process
// whose CPU mask allows c (a process locked to one CPU sits in that CPU's "local
// queue", one allowed on several sits in the "global queue"; both are searched
// together) or the process already running on c. The most urgent candidate wins;
// among equal priorities the running process keeps the CPU unless its round-robin
// time slice has run out (yield), otherwise the longest-ready process wins. CPUs
// are served in order 0,1,2 and a ready process chosen for a lower CPU is not
// offered to a higher one, so no process is chosen twice.
//
// Following the document: priority-based preemptive scheduling, one scheduler per
// CPU checking local and global queues, round-robin among equal priorities. The
// fixed CPU order used to share the global queue is this design's choice.
// Timing: outputs follow the table within the same cycle.
module rtu_scheduler
  import rtu_pkg::*;
#(
  parameter int unsigned NPROC = 128
) (
  input  tinfo_t          tab [NPROC],
  input  logic [NCPU-1:0] yield,       // round-robin slice of CPU c has expired
  output logic [NCPU-1:0] nxt_valid,
  output pid_t            nxt_pid [NCPU]
);

  always_comb begin
    logic [NCPU-1:0] v;
    pid_t            p [NCPU];
    v = '0;
    for (int c = 0; c < NCPU; c++) p[c] = '0;
    for (int c = 0; c < NCPU; c++) begin
      logic        found;
      logic [1:0]  brank;
      prio_t       bprio;
      logic [31:0] bseq;
      found = 1'b0;
      brank = '0;
      bprio = '0;
      bseq  = '0;
      for (int i = 0; i < NPROC; i++) begin
        logic       cand;
        logic       taken;
        logic [1:0] rank;
        logic       better;
        taken = 1'b0;
        for (int d = 0; d < c; d++)
          if (v[d] && p[d] == pid_t'(i)) taken = 1'b1;
        cand = (tab[i].st == T_READY && tab[i].aff[c] && !taken) ||
               (tab[i].st == T_RUNNING && tab[i].cpu == cpu_t'(c));
        // rank among equal priorities: 0 running here, 1 ready, 2 running but yielding
        if (tab[i].st == T_RUNNING) rank = yield[c] ? 2'd2 : 2'd0;
        else                        rank = 2'd1;
        better = !found || tab[i].prio > bprio ||
                 (tab[i].prio == bprio && (rank < brank ||
                  (rank == brank && older(tab[i].seq, bseq))));
        if (cand && better) begin
          found      = 1'b1;
          brank      = rank;
          bprio      = tab[i].prio;
          bseq       = tab[i].seq;
          p[c]       = pid_t'(i);
        end
      end
      v[c] = found;
    end
    nxt_valid = v;
    nxt_pid   = p;
  end

endmodule
