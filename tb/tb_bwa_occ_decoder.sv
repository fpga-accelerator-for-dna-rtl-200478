// tb_bwa_occ_decoder: checks the occurrence decoder against a direct count.
//
// Builds random 64-row groups (BWT symbols, a '$' slot or none, and a base
// count vector), encodes them the way the host does, and compares the
// decoded O(a, row) for every row of the group with counts accumulated
// independently from the start of the group. Also checks the 7-row example
// reference X = CCTGAG (BWT G G $ C A T C) laid out in one code.
module tb_bwa_occ_decoder;
  import bwa_pkg::*;

  logic [CODE_W-1:0] code;
  logic [SLOT_W-1:0] j, dollar_slot;
  logic              dollar_hit;
  occ_t              occ;

  int checks = 0, failures = 0;

  bwa_occ_decoder dut (.code, .j, .dollar_hit, .dollar_slot, .occ);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encode: sym[r] per row, dollar at dslot (if dhit), base = O(a, row before group)
  task automatic run_group(input logic [1:0] sym [64], input bit dhit,
                           input int dslot, input int unsigned base [4]);
    int unsigned exp_cnt [64][4];
    int unsigned run [4];
    for (int a = 0; a < 4; a++) run[a] = base[a];
    for (int r = 0; r < 64; r++) begin
      if (!(dhit && r == dslot)) run[sym[r]]++;
      for (int a = 0; a < 4; a++) exp_cnt[r][a] = run[a];
    end
    code = '0;
    for (int r = 0; r < 64; r++)
      code[2*r +: 2] = (dhit && r == dslot) ? 2'b00 : sym[r];
    for (int a = 0; a < 4; a++) code[128 + 32*a +: 32] = exp_cnt[63][a];
    dollar_hit  = dhit;
    dollar_slot = SLOT_W'(dslot);
    for (int r = 0; r < 64; r++) begin
      j = SLOT_W'(r);
      #1;
      for (int a = 0; a < 4; a++) begin
        checks++;
        if (occ[a] !== exp_cnt[r][a]) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d sym %0d: got %0d exp %0d", r, a, occ[a], exp_cnt[r][a]);
        end
      end
    end
  endtask

  initial begin
    logic [1:0] sym [64];
    int unsigned base [4];
    // worked example: rows 0..6 of X = CCTGAG, BWT = G G $ C A T C, padded with
    // A symbols; check rows 0..6 against the occurrence table of the example.
    begin
      int unsigned tbl [7][4] = '{'{0,0,1,0}, '{0,0,2,0}, '{0,0,2,0}, '{0,1,2,0},
                                  '{1,1,2,0}, '{1,1,2,1}, '{1,2,2,1}};
      logic [1:0] bwt [7] = '{2'b10, 2'b10, 2'b00, 2'b01, 2'b00, 2'b11, 2'b01};
      for (int r = 0; r < 64; r++) sym[r] = (r < 7) ? bwt[r] : 2'b00;
      code = '0;
      for (int r = 0; r < 64; r++) code[2*r +: 2] = sym[r];
      // counts at row 63: example counts at row 6 plus 57 padding A symbols
      code[128 +: 32] = 1 + 57; code[160 +: 32] = 2; code[192 +: 32] = 2; code[224 +: 32] = 1;
      dollar_hit = 1'b1; dollar_slot = 6'd2;
      for (int r = 0; r < 7; r++) begin
        j = SLOT_W'(r); #1;
        for (int a = 0; a < 4; a++) begin
          checks++;
          if (occ[a] != tbl[r][a]) begin
            failures++;
            $display("FAIL example row %0d sym %0d: got %0d exp %0d", r, a, occ[a], tbl[r][a]);
          end
        end
      end
    end
    for (int t = 0; t < 200; t++) begin
      for (int r = 0; r < 64; r++) sym[r] = 2'($urandom);
      for (int a = 0; a < 4; a++) base[a] = (t % 3 == 0) ? $urandom : $urandom_range(0, 100000);
      run_group(sym, (t % 2) == 1, $urandom_range(0, 63), base);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
