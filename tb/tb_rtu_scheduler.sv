// tb_rtu_scheduler -- self-checking test of the multi-CPU scheduler.
// Fills a 16-entry process table with random states, priorities, CPU masks and
// time stamps and compares the choice for each CPU with a reference model that
// ranks all candidates from the scheduling rules: highest priority first, the
// running process keeps its CPU among equals unless its slice ran out, then the
// longest ready; CPUs take their pick in order 0,1,2. Also checks the invariant
// that no process is chosen for two CPUs and every choice may run there.
module tb_rtu_scheduler;
  import rtu_pkg::*;

  localparam int NP = 16;
  tinfo_t tab [NP];
  logic [NCPU-1:0] yield, nxt_valid;
  pid_t nxt_pid [NCPU];
  int checks = 0, failures = 0;

  rtu_scheduler #(.NPROC(NP)) dut (.tab, .yield, .nxt_valid, .nxt_pid);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // a ranks before b for cpu c
  function automatic bit ranks_before(int a, int b, int c);
    int ra, rb;
    if (tab[a].prio != tab[b].prio) return tab[a].prio > tab[b].prio;
    ra = (tab[a].st == T_RUNNING) ? (yield[c] ? 2 : 0) : 1;
    rb = (tab[b].st == T_RUNNING) ? (yield[c] ? 2 : 0) : 1;
    if (ra != rb) return ra < rb;
    return $signed(tab[a].seq - tab[b].seq) < 0;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit cpu_used [NCPU];
      int pick [NCPU];
      bit taken [NP];
      for (int c = 0; c < NCPU; c++) cpu_used[c] = 0;
      for (int i = 0; i < NP; i++) begin
        int c;
        tab[i] = '0;
        tab[i].prio = prio_t'($urandom % ((t % 2) ? 4 : 64));
        tab[i].aff = 3'($urandom);
        tab[i].seq = 32'($urandom % 64) + 32'hFFFF_FFE0;  // stamps around the wrap
        case ($urandom % 4)
          0: tab[i].st = T_READY;
          1: tab[i].st = T_BLOCKED;
          2: tab[i].st = T_DORMANT;
          default: begin
            c = int'($urandom % NCPU);
            if (!cpu_used[c]) begin
              cpu_used[c] = 1;
              tab[i].st = T_RUNNING;
              tab[i].cpu = cpu_t'(c);
            end else tab[i].st = T_READY;
          end
        endcase
        taken[i] = 0;
      end
      yield = 3'($urandom);
      #1;
      for (int c = 0; c < NCPU; c++) begin
        pick[c] = -1;
        for (int i = 0; i < NP; i++) begin
          bit cand;
          cand = (tab[i].st == T_READY && tab[i].aff[c] && !taken[i]) ||
                 (tab[i].st == T_RUNNING && int'(tab[i].cpu) == c);
          if (cand && (pick[c] < 0 || ranks_before(i, pick[c], c))) pick[c] = i;
        end
        if (pick[c] >= 0) taken[pick[c]] = 1;
        chk($sformatf("cpu %0d valid", c), nxt_valid[c] == (pick[c] >= 0));
        if (pick[c] >= 0) chk($sformatf("cpu %0d pick %0d got %0d", c, pick[c], nxt_pid[c]),
                              int'(nxt_pid[c]) == pick[c]);
      end
      for (int a = 0; a < NCPU; a++)
        for (int b = a + 1; b < NCPU; b++)
          if (nxt_valid[a] && nxt_valid[b]) chk("no double choice", nxt_pid[a] != nxt_pid[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
