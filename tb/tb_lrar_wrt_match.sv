// tb_lrar_wrt_match -- self-checking test of the WRT comparator bank at the
// default size (16 entries, 15-bit rows, 7-bit tags). Random tables in both
// modes; the expected hit is computed from the stored row list (DM) or the
// stored cluster list (AM) without the entry packing.
module tb_lrar_wrt_match;
  import lrar_pkg::*;
  localparam int unsigned RB = 15, N = 16, CB = 7;
  lrar_mode_e          mode;
  logic [N-1:0][RB-1:0] entry;
  logic [N-1:0]        valid_hi, valid_lo, hit_vec;
  logic [RB-1:0]       row;
  logic                hit;
  int checks = 0, failures = 0, hits = 0;

  int unsigned rows_dm [N];
  int unsigned tag_hi [N], tag_lo [N];

  lrar_wrt_match #(.ROW_BITS(RB), .ENTRIES(N), .CLUSTER_BITS(CB)) dut (.*);

  function automatic bit ref_entry_hit(input int i, input int unsigned r);
    if (mode == MODE_DM && valid_hi[i] && rows_dm[i] == r) return 1;
    if (mode == MODE_AM && valid_hi[i] && tag_hi[i] == (r >> (RB - CB))) return 1;
    if (mode == MODE_AM && valid_lo[i] && tag_lo[i] == (r >> (RB - CB))) return 1;
    return 0;
  endfunction

  function automatic bit ref_hit(input int unsigned r);
    for (int i = 0; i < N; i++) if (ref_entry_hit(i, r)) return 1;
    return 0;
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      mode = (t % 2) ? MODE_AM : MODE_DM;
      for (int i = 0; i < N; i++) begin
        rows_dm[i] = $urandom % (1 << RB);
        tag_hi[i]  = $urandom % (1 << CB);
        tag_lo[i]  = $urandom % (1 << CB);
        valid_hi[i] = ($urandom % 4) != 0;
        valid_lo[i] = (mode == MODE_AM) && (($urandom % 4) != 0);
        if (mode == MODE_DM) entry[i] = RB'(rows_dm[i]);
        else entry[i] = {CB'(tag_hi[i]), 1'(($urandom)), CB'(tag_lo[i])};
      end
      for (int k = 0; k < 40; k++) begin
        int unsigned r;
        // half of the probes target a stored row or cluster
        if (k % 2 == 0) r = $urandom % (1 << RB);
        else if (mode == MODE_DM) r = rows_dm[$urandom % N];
        else r = ((($urandom % 2) ? tag_hi[$urandom % N] : tag_lo[$urandom % N]) << (RB - CB))
                 | ($urandom % (1 << (RB - CB)));
        row = RB'(r);
        #1;
        checks++;
        if (hit != ref_hit(r)) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d row=%0h hit=%0b", mode, r, hit);
        end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (hit_vec[i] != ref_entry_hit(i, r)) begin
            failures++;
            if (failures < 10) $display("FAIL mode=%0d row=%0h entry %0d", mode, r, i);
          end
        end
        if (hit) hits++;
      end
    end
    checks++;
    if (hits < 1000) begin failures++; $display("FAIL too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
