// tb_idx_gen: self-checking test of the MIN1 index generator.
// Part 1 (K = 8): all 128 settings of the seven comparison bits c00..c03,
// c10, c11, c20 are applied and IDX is compared with the
// four-multiplexor formula written out by hand: IDX[2] = c20, IDX[1] = c20 ? c11 : c10,
// IDX[0] = c0[{IDX[2], IDX[1]}].
// Part 2 (K = 16): random input values are compared pairwise here, level
// by level, to form the comparison bits, and IDX must equal the position
// of the lowest-indexed minimum found by a linear scan.
module tb_idx_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // K = 8, flat order: c00 c01 c02 c03 c10 c11 c20 in bits 0..6.
  logic [6:0] cmp8;
  logic [2:0] idx8;
  idx_gen dut8 (.cmp(cmp8), .idx_o(idx8));

  logic [14:0] cmp16;
  logic [3:0]  idx16;
  idx_gen #(.K(16)) dut16 (.cmp(cmp16), .idx_o(idx16));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp8;
    int v[16];
    int lvl_min[5][16];
    int lvl_pos[5][16];
    int ofs, best, bestpos;

    cmp16 = '0;
    for (int c = 0; c < 128; c++) begin
      cmp8 = 7'(c);
      exp8[2] = cmp8[6];
      exp8[1] = cmp8[6] ? cmp8[5] : cmp8[4];
      exp8[0] = cmp8[{1'b0, exp8[2], exp8[1]}];
      #1;
      checks++;
      if (idx8 !== exp8) begin
        failures++;
        $display("FAIL K=8 cmp=%b idx=%0d exp=%0d", cmp8, idx8, exp8);
      end
      @(posedge clk);
    end

    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 16; i++) begin
        v[i] = int'($urandom_range(0, 7));
        lvl_min[0][i] = v[i];
        lvl_pos[0][i] = i;
      end
      // Reference comparison bits: level l compares pairs of level l-1 winners.
      ofs = 0;
      for (int l = 1; l <= 4; l++) begin
        for (int j = 0; j < (16 >> l); j++) begin
          logic c;
          c = lvl_min[l-1][2*j+1] < lvl_min[l-1][2*j];
          cmp16[ofs + j] = c;
          lvl_min[l][j] = c ? lvl_min[l-1][2*j+1] : lvl_min[l-1][2*j];
          lvl_pos[l][j] = c ? lvl_pos[l-1][2*j+1] : lvl_pos[l-1][2*j];
        end
        ofs += 16 >> l;
      end
      best = v[0];
      bestpos = 0;
      for (int i = 1; i < 16; i++) if (v[i] < best) begin best = v[i]; bestpos = i; end
      #1;
      checks++;
      if (int'(idx16) != bestpos) begin
        failures++;
        if (failures < 10) $display("FAIL K=16 cmp=%b idx=%0d exp=%0d", cmp16, idx16, bestpos);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
