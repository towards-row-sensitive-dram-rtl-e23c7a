// tb_lrar_wrt -- self-checking test of the weak row table at default size.
// A reference model keeps the stored rows (DM) or clusters (AM) as lists and
// mirrors loading (a repeated row takes a slot again), the DM-to-AM fallback under
// temperature scaling, drops, clear and set_mode. After every operation the
// mode, fill count and pulses are compared, and coverage of random and
// stored rows is compared with the table's contents.
module tb_lrar_wrt;
  import lrar_pkg::*;
  localparam int unsigned RB = 15, N = 16, CB = 7, SW = $clog2(2 * N + 1);
  logic clk = 0, rst_n = 0, clear = 0, set_mode = 0, temp_scale_en = 0, wr_en = 0;
  lrar_mode_e new_mode = MODE_DM, mode;
  logic [RB-1:0] wr_row = '0;
  logic [N-1:0][RB-1:0] entry;
  logic [N-1:0] valid_hi, valid_lo;
  logic [SW-1:0] used;
  logic to_am, dropped;
  int checks = 0, failures = 0, n_to_am = 0, n_drop = 0, n_dup = 0;

  lrar_wrt #(.ROW_BITS(RB), .ENTRIES(N), .CLUSTER_BITS(CB)) dut (.*);
  always #5 clk = ~clk;

  // reference model
  lrar_mode_e  m_mode = MODE_DM;
  int unsigned m_rows[$];   // DM rows, in slot order
  int unsigned m_tags[$];   // AM clusters, in slot order
  bit          m_to_am, m_drop;

  function automatic bit m_covers(int unsigned r);
    if (m_mode == MODE_DM) begin
      foreach (m_rows[i]) if (m_rows[i] == r) return 1;
    end else begin
      foreach (m_tags[i]) if (m_tags[i] == (r >> (RB - CB))) return 1;
    end
    return 0;
  endfunction

  function automatic bit dut_covers(int unsigned r);
    int unsigned t = r >> (RB - CB);
    for (int i = 0; i < N; i++) begin
      if (mode == MODE_DM && valid_hi[i] && entry[i] == RB'(r)) return 1;
      if (mode == MODE_AM && valid_hi[i] && entry[i][RB-1 -: CB] == CB'(t)) return 1;
      if (mode == MODE_AM && valid_lo[i] && entry[i][CB-1:0] == CB'(t)) return 1;
    end
    return 0;
  endfunction

  task automatic model_write(int unsigned r);
    m_to_am = 0; m_drop = 0;
    if (m_covers(r)) n_dup++;   // a repeat still takes a slot
    if (m_mode == MODE_DM) begin
      if (m_rows.size() < N) m_rows.push_back(r);
      else if (temp_scale_en) begin
        m_mode = MODE_AM; m_to_am = 1;
        m_tags.delete();
        foreach (m_rows[i]) m_tags.push_back(m_rows[i] >> (RB - CB));
        m_tags.push_back(r >> (RB - CB));
      end else m_drop = 1;
    end else begin
      if (m_tags.size() < 2 * N) m_tags.push_back(r >> (RB - CB));
      else m_drop = 1;
    end
  endtask

  task automatic compare(string what);
    int unsigned exp_used = (m_mode == MODE_DM) ? m_rows.size() : m_tags.size();
    checks++;
    if (mode != m_mode || used != SW'(exp_used) || to_am != m_to_am || dropped != m_drop) begin
      failures++;
      $display("FAIL %s: mode %0d/%0d used %0d/%0d to_am %0b/%0b drop %0b/%0b", what,
               mode, m_mode, used, exp_used, to_am, m_to_am, dropped, m_drop);
    end
    for (int k = 0; k < 24; k++) begin
      int unsigned r;
      if (k < 8 && m_rows.size() > 0) r = m_rows[$urandom % m_rows.size()];
      else if (k < 16 && m_tags.size() > 0) r = (m_tags[$urandom % m_tags.size()] << (RB - CB)) | ($urandom % 256);
      else r = $urandom % (1 << RB);
      checks++;
      if (dut_covers(r) != m_covers(r)) begin
        failures++;
        $display("FAIL %s: coverage of row %0h dut %0b model %0b", what, r, dut_covers(r), m_covers(r));
      end
    end
  endtask

  task automatic do_write(int unsigned r);
    @(negedge clk); wr_en = 1; wr_row = RB'(r);
    model_write(r);
    @(negedge clk); wr_en = 0;
    if (to_am) n_to_am++;
    if (dropped) n_drop++;
    compare($sformatf("write %0h", r));
  endtask

  task automatic do_set_mode(lrar_mode_e md);
    @(negedge clk); set_mode = 1; new_mode = md;
    @(negedge clk); set_mode = 0;
    m_mode = md; m_rows.delete(); m_tags.delete(); m_to_am = 0; m_drop = 0;
    compare("set_mode");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); compare("reset");
    // DM: fill 16 distinct weak rows, with a duplicate in between
    for (int i = 0; i < N; i++) begin
      do_write((i * 1237 + 5) % (1 << RB));
      if (i == 3) do_write(5);
    end
    // DM full without temperature scaling: dropped
    do_write(12345);
    // clear keeps DM and empties
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    m_rows.delete(); m_to_am = 0; m_drop = 0; compare("clear");
    // refill, now with temperature scaling: overflow switches to AM
    temp_scale_en = 1;
    for (int i = 0; i < N; i++) do_write((i * 3001 + 77) % (1 << RB));
    do_write(32000);                 // new cluster after the switch
    do_write(32001);                 // same cluster again
    // fill the AM table to its 32 clusters, then overflow it
    for (int i = 0; i < 40; i++) do_write($urandom % (1 << RB));
    // explicit AM load
    do_set_mode(MODE_AM);
    for (int i = 0; i < 10; i++) do_write(i << 8);
    do_set_mode(MODE_DM);
    // random mixed traffic
    for (int t = 0; t < 4; t++) begin
      temp_scale_en = t[0];
      for (int i = 0; i < 30; i++) do_write($urandom % (1 << RB));
      do_set_mode(MODE_DM);
    end
    checks++;
    if (n_to_am < 1 || n_drop < 2 || n_dup < 2) begin
      failures++;
      $display("FAIL coverage to_am=%0d drop=%0d dup=%0d", n_to_am, n_drop, n_dup);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
