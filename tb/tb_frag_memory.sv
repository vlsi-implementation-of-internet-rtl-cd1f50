// tb_frag_memory: checks the memory unit's identification and storage.
// Lookups of absent and present keys, allocation of the lowest free place,
// a full memory, state read-back, release by the page and by the reassembly
// unit, keys that differ in one field only, and the two-clock answer time
// (the outputs must still show the previous answer one clock after lookup).
module tb_frag_memory;
  import tucfp_pkg::*;

  localparam int N = 2;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              lookup = 1'b0;
  frag_key_t         key = '0;
  logic              hit, free_avail;
  logic [SLOT_W-1:0] hit_idx, free_idx;
  frag_state_t       rd_state;
  logic              wr_en = 1'b0, wr_alloc = 1'b0, rel_en = 1'b0, ra_drop = 1'b0;
  logic [SLOT_W-1:0] wr_idx = '0, rel_idx = '0, ra_drop_idx = '0;
  frag_state_t       wr_state = '0;
  logic [N-1:0]      occupied;
  int checks = 0, failures = 0;

  frag_memory #(.N_ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (hit=%b idx=%0d free=%b fidx=%0d occ=%b)", what, hit, hit_idx, free_avail, free_idx, occupied);
    end
  endtask

  // lookup; checks that the answer is not there after one clock, returns after two
  task automatic do_lookup(input frag_key_t k);
    logic h0, f0;
    logic [SLOT_W-1:0] i0, fi0;
    h0 = hit; f0 = free_avail; i0 = hit_idx; fi0 = free_idx;
    key = k; lookup = 1'b1;
    @(negedge clk);
    lookup = 1'b0;
    check(hit == h0 && free_avail == f0 && hit_idx == i0 && free_idx == fi0, "answer not before the second clock");
    @(negedge clk);
  endtask

  task automatic write(input logic [SLOT_W-1:0] idx, input logic alloc, input frag_state_t s);
    wr_en = 1'b1; wr_alloc = alloc; wr_idx = idx; wr_state = s;
    @(negedge clk);
    wr_en = 1'b0; wr_alloc = 1'b0;
  endtask

  function automatic frag_key_t rnd_key(input bit v6);
    frag_key_t k;
    k.v6 = v6;
    k.src = {$urandom, $urandom, $urandom, $urandom};
    k.dst = {$urandom, $urandom, $urandom, $urandom};
    k.id = $urandom;
    k.proto = 8'($urandom);
    return k;
  endfunction

  initial begin
    frag_key_t a, b, c, a2;
    frag_state_t sa, sb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    a = rnd_key(1'b0); b = rnd_key(1'b1); c = rnd_key(1'b0);
    sa = '{partial: 16'h1234, acc_len: 16'd80, total: 16'd0, total_known: 1'b0};
    sb = '{partial: 16'hBEEF, acc_len: 16'd16, total: 16'd200, total_known: 1'b1};

    // keep the outputs from a previous answer distinguishable
    do_lookup(a);
    check(!hit && free_avail && free_idx == 0, "empty memory: miss, place 0 free");
    write(0, 1'b1, sa);
    check(occupied == 2'b01, "place 0 taken");
    do_lookup(b);
    check(!hit && free_avail && free_idx == 1, "other key: miss, place 1 free");
    write(1, 1'b1, sb);
    do_lookup(a);
    check(hit && hit_idx == 0 && rd_state == sa, "key a found with its state");
    do_lookup(b);
    check(hit && hit_idx == 1 && rd_state == sb, "key b found with its state");
    do_lookup(c);
    check(!hit && !free_avail, "memory full");
    // one field different is another packet
    a2 = a; a2.id[0] = ~a2.id[0];
    do_lookup(a2);
    check(!hit, "identification differs");
    a2 = a; a2.dst[5] = ~a2.dst[5];
    do_lookup(a2);
    check(!hit, "destination differs");
    a2 = a; a2.v6 = 1'b1;
    do_lookup(a2);
    check(!hit, "version differs");
    // update in place
    sa.acc_len = 16'd160; sa.partial = 16'h5555;
    write(0, 1'b0, sa);
    do_lookup(a);
    check(hit && hit_idx == 0 && rd_state == sa, "updated state");
    // release by the page
    rel_en = 1'b1; rel_idx = 0;
    @(negedge clk);
    rel_en = 1'b0;
    check(occupied == 2'b10, "place 0 released");
    do_lookup(a);
    check(!hit && free_avail && free_idx == 0, "released key no longer found");
    write(0, 1'b1, sa);
    // reassembly unit drops place 1
    ra_drop = 1'b1; ra_drop_idx = 1;
    @(negedge clk);
    ra_drop = 1'b0;
    check(occupied == 2'b01, "place 1 dropped");
    do_lookup(b);
    check(!hit && free_avail && free_idx == 1, "dropped key no longer found");
    // random traffic against a model
    begin
      frag_key_t keys[4];
      int where[4];
      foreach (keys[i]) begin keys[i] = rnd_key(1'($urandom_range(0, 1))); where[i] = -1; end
      rel_en = 1'b1; rel_idx = 0; @(negedge clk); rel_en = 1'b0;
      for (int it = 0; it < 2000; it++) begin
        int k = $urandom_range(0, 3);
        int exp_free = -1;
        bit used [N];
        foreach (used[i]) used[i] = 0;
        foreach (where[i]) if (where[i] >= 0) used[where[i]] = 1;
        for (int i = N - 1; i >= 0; i--) if (!used[i]) exp_free = i;
        do_lookup(keys[k]);
        check(hit == (where[k] >= 0), "random: hit");
        if (where[k] >= 0) begin
          check(hit_idx == SLOT_W'(where[k]), "random: place");
          if ($urandom_range(0, 1) == 1) begin
            rel_en = 1'b1; rel_idx = hit_idx; @(negedge clk); rel_en = 1'b0;
            where[k] = -1;
          end
        end else begin
          check(free_avail == (exp_free >= 0), "random: free place");
          if (exp_free >= 0) begin
            check(free_idx == SLOT_W'(exp_free), "random: lowest free place");
            write(free_idx, 1'b1, sa);
            where[k] = exp_free;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
