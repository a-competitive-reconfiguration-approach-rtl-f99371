// tb_ga_pmx -- checks partially matched crossover of LUT placements.
//
// Directed case (8 LUTs, crossover point 4): placements A = 0..7 and
// B = 0 3 4 6 7 2 1 5 give A' = 0 6 4 3 7 2 1 5 and B' = 0 3 2 1 4 5 6 7
// (worked out by hand with the chained mapping pairs (4,7) (5,2) (6,1)
// (7,5)). Random cases: both offspring are permutations, the section comes
// from the other parent gene for gene, genes outside the section keep
// their function, and keep their slot when it does not collide.
module tb_ga_pmx;
  import oes_pkg::*;
  localparam int N = 8;
  gene_t [N-1:0] a, b, ao, bo;
  logic [3:0] cp;
  int checks = 0, failures = 0;

  ga_pmx #(.N_LUT(N)) dut (.a_i(a), .b_i(b), .cp, .a_o(ao), .b_o(bo));

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic is_perm(input gene_t [N-1:0] c);
    logic [N-1:0] seen;
    seen = '0;
    for (int i = 0; i < N; i++) if (int'(c[i].slot) < N) seen[c[i].slot] = 1'b1;
    return &seen;
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pb[N] = '{0, 3, 4, 6, 7, 2, 1, 5};
    int ea[N] = '{0, 6, 4, 3, 7, 2, 1, 5};
    int eb[N] = '{0, 3, 2, 1, 4, 5, 6, 7};
    for (int i = 0; i < N; i++) begin
      a[i] = '{slot: slot_t'(i),     src: '0, content: 16'hA000 + 16'(i)};
      b[i] = '{slot: slot_t'(pb[i]), src: '0, content: 16'hB000 + 16'(i)};
    end
    cp = 4'd4;
    #1;
    for (int i = 0; i < N; i++) begin
      ok(int'(ao[i].slot) == ea[i], $sformatf("A' position %0d", i));
      ok(int'(bo[i].slot) == eb[i], $sformatf("B' position %0d", i));
    end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = gene_t'({$urandom, $urandom}); a[i].slot = slot_t'(i);
        b[i] = gene_t'({$urandom, $urandom}); b[i].slot = slot_t'(i);
      end
      for (int i = N - 1; i > 0; i--) begin
        int j; slot_t s;
        j = $urandom_range(0, i); s = a[i].slot; a[i].slot = a[j].slot; a[j].slot = s;
        j = $urandom_range(0, i); s = b[i].slot; b[i].slot = b[j].slot; b[j].slot = s;
      end
      cp = 4'($urandom_range(0, N));
      #1;
      ok(is_perm(ao) && is_perm(bo), "offspring are permutations");
      for (int i = 0; i < N; i++) begin
        if (i >= int'(cp)) begin
          ok(ao[i] == b[i] && bo[i] == a[i], "section exchanged");
        end else begin
          logic coll;
          ok(ao[i].src == a[i].src && ao[i].content == a[i].content, "A' function kept");
          ok(bo[i].src == b[i].src && bo[i].content == b[i].content, "B' function kept");
          coll = 1'b0;
          for (int j = int'(cp); j < N; j++) if (b[j].slot == a[i].slot) coll = 1'b1;
          if (!coll) ok(ao[i].slot == a[i].slot, "non-colliding slot kept");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
