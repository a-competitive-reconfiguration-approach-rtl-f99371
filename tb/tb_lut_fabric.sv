// tb_lut_fabric -- self-checking test of the genotype-configured LUT array.
//
// 1. Configures a full adder on inputs 0..2 and checks {carry,sum} against
//    the arithmetic sum of the three bits for all eight input combinations.
// 2. Injects a stuck-at-0 fault on the physical pin carrying input b of the
//    sum LUT and checks that sum becomes a ^ cin, then moves the sum logic
//    to another slot and checks that the fault no longer matters.
// 3. Runs random feed-forward configurations with random placements and
//    random faults against a reference evaluation written in the testbench.
module tb_lut_fabric;
  import oes_pkg::*;
  localparam int N_IN = 6, N_OUT = 6, N_LUT = 16;

  logic [N_IN-1:0]             x;
  gene_t [N_LUT-1:0]           chrom;
  src_t  [N_OUT-1:0]           outsel;
  logic  [N_LUT-1:0][PINS-1:0] sm, sv;
  logic  [N_OUT-1:0]           y;
  int checks = 0, failures = 0;

  lut_fabric dut (.x, .chrom, .outsel, .stuck_mask(sm), .stuck_val(sv), .y);

  task automatic check(input logic [N_OUT-1:0] exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: x=%b y=%b exp=%b", what, x, y, exp);
    end
  endtask

  function automatic logic [N_OUT-1:0] model();
    logic [N_IN+N_LUT-1:0] v;
    logic [N_OUT-1:0] r;
    v = '0;
    v[N_IN-1:0] = x;
    for (int g = 0; g < N_LUT; g++) begin
      logic [3:0] a;
      for (int p = 0; p < 4; p++) begin
        int s;
        s = int'(chrom[g].src[p]);
        a[p] = (s < N_IN + g) ? v[s] : 1'b0;
        if (sm[chrom[g].slot][p]) a[p] = sv[chrom[g].slot][p];
      end
      v[N_IN+g] = chrom[g].content[a];
    end
    for (int j = 0; j < N_OUT; j++) r[j] = v[outsel[j]];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sm = '0; sv = '0;
    for (int g = 0; g < N_LUT; g++) chrom[g] = '{slot: slot_t'(g), src: '0, content: '0};
    chrom[0] = '{slot: 4'd0, src: '{5'd0, 5'd2, 5'd1, 5'd0}, content: 16'h9696}; // a^b^c
    chrom[1] = '{slot: 4'd1, src: '{5'd0, 5'd2, 5'd1, 5'd0}, content: 16'hE8E8}; // maj
    outsel = '0;
    outsel[0] = src_t'(N_IN + 0);
    outsel[1] = src_t'(N_IN + 1);
    for (int i = 0; i < 8; i++) begin
      logic [1:0] s2;
      x = N_IN'(i);
      s2 = 2'(x[0]) + 2'(x[1]) + 2'(x[2]);
      #1 check({{4{x[0]}}, s2}, "full adder");
    end
    // pin A2 of slot 0 carries b: stuck at 0
    sm[0][1] = 1'b1; sv[0][1] = 1'b0;
    for (int i = 0; i < 8; i++) begin
      x = N_IN'(i);
      #1 checks++;
      if (y[0] !== (x[0] ^ x[2])) begin failures++; $display("FAIL stuck sum x=%b", x); end
    end
    // move the sum logic to spare slot 5 (its gene 5 takes slot 0)
    chrom[0].slot = 4'd5; chrom[5].slot = 4'd0;
    for (int i = 0; i < 8; i++) begin
      logic [1:0] s2;
      x = N_IN'(i);
      s2 = 2'(x[0]) + 2'(x[1]) + 2'(x[2]);
      #1 check({{4{x[0]}}, s2}, "relocated adder");
    end
    // random configurations
    for (int t = 0; t < 300; t++) begin
      for (int g = 0; g < N_LUT; g++) begin
        chrom[g].slot = slot_t'(g);
        for (int p = 0; p < 4; p++) chrom[g].src[p] = src_t'($urandom_range(0, N_IN + g));
        chrom[g].content = 16'($urandom);
      end
      for (int g = N_LUT - 1; g > 0; g--) begin
        int j; slot_t tmp;
        j = $urandom_range(0, g);
        tmp = chrom[g].slot; chrom[g].slot = chrom[j].slot; chrom[j].slot = tmp;
      end
      for (int j = 0; j < N_OUT; j++) outsel[j] = src_t'($urandom_range(0, N_IN + N_LUT - 1));
      sm = '0; sv = '0;
      if (t % 2 == 1) begin
        sm[$urandom_range(0, N_LUT-1)][$urandom_range(0, 3)] = 1'b1;
        sv = {N_LUT{4'($urandom)}};
      end
      for (int k = 0; k < 8; k++) begin
        x = N_IN'($urandom);
        #1 check(model(), "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
