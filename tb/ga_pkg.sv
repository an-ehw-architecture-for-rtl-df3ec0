// ga_pkg: a (mu + lambda) genetic algorithm for testbenches, used to evolve
// configuration words of the reconfigurable array.
//
// Population of MU = 50 parents; each generation adds LAMBDA = 50 children
// made from randomly chosen parents by single-point crossover (probability
// 80%, otherwise a copy of the first parent) and bit-flip mutation
// (probability 0.014% per gene). After the children are scored, the best of
// all 100 survives (elitism) and 49 more are picked by binary tournaments
// among the rest. Lower fitness is better. The testbench scores the
// chromosomes on the hardware and writes the scores into `fit`.
package ga_pkg;

  class ga #(int L = 305, int MU = 50, int LAMBDA = 50);
    typedef bit [L-1:0] chrom_t;
    chrom_t pop [MU + LAMBDA];
    real    fit [MU + LAMBDA];
    int     crossover_pct   = 80;
    int     mutation_ppm    = 140;   // 0.014 % per gene
    int     n_crossovers    = 0;
    int     n_mutations     = 0;

    function chrom_t random_chrom();
      chrom_t c;
      for (int i = 0; i < L; i++) c[i] = 1'($urandom);
      return c;
    endfunction

    function void init();
      for (int i = 0; i < MU + LAMBDA; i++) begin
        pop[i] = random_chrom();
        fit[i] = 1.0e30;
      end
    endfunction

    function void make_children();
      for (int i = MU; i < MU + LAMBDA; i++) begin
        int p1, p2, cut;
        p1 = $urandom_range(0, MU - 1);
        p2 = $urandom_range(0, MU - 1);
        pop[i] = pop[p1];
        if ($urandom_range(0, 99) < crossover_pct) begin
          cut = $urandom_range(1, L - 1);
          for (int b = cut; b < L; b++) pop[i][b] = pop[p2][b];
          n_crossovers++;
        end
        for (int b = 0; b < L; b++)
          if ($urandom_range(0, 999999) < mutation_ppm) begin
            pop[i][b] = ~pop[i][b];
            n_mutations++;
          end
        fit[i] = 1.0e30;
      end
    endfunction

    function int best_index();
      int b = 0;
      for (int i = 1; i < MU + LAMBDA; i++) if (fit[i] < fit[b]) b = i;
      return b;
    endfunction

    function void select();
      chrom_t np [MU];
      real    nf [MU];
      bit     taken [MU + LAMBDA];
      int     e;
      foreach (taken[i]) taken[i] = 0;
      e = best_index();
      np[0] = pop[e];
      nf[0] = fit[e];
      taken[e] = 1;
      for (int k = 1; k < MU; k++) begin
        int a, b, w;
        do a = $urandom_range(0, MU + LAMBDA - 1); while (taken[a]);
        do b = $urandom_range(0, MU + LAMBDA - 1); while (taken[b]);
        w = (fit[a] <= fit[b]) ? a : b;
        taken[w] = 1;
        np[k] = pop[w];
        nf[k] = fit[w];
      end
      for (int k = 0; k < MU; k++) begin
        pop[k] = np[k];
        fit[k] = nf[k];
      end
    endfunction
  endclass

endpackage
