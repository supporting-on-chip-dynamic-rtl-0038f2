// tb_merge_buffer: allocates merge groups of 1..4 members, deposits their
// values interleaved across groups in random order, and checks every merge
// task that comes out (kernel, argument count, values in deposit order,
// destination, interrupt flag), that each group emits exactly once, that
// allocation stops when all groups are taken and that all groups return to
// the free list.
module tb_merge_buffer;
  import cb2_pkg::*;
  localparam int S = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ready_o, alloc_req, alloc_gnt, dep_valid, dep_ready, mt_valid, mt_ready;
  merge_meta_t alloc_meta;
  logic [3:0] alloc_slot, dep_slot;
  arg_t dep_value;
  sub_t mt_sub;
  logic [4:0] free_groups;
  merge_buffer #(.SLOTS(S)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected per group
  int   cnt [S];
  arg_t exp_vals [S][4];
  int   emitted = 0, expected_emits = 0;
  always @(posedge clk) if (mt_valid && mt_ready) begin
    int s;
    s = int'(mt_sub.dest.idx);       // the test uses dest.idx = slot
    check(mt_sub.kernel == kid_t'(s + 100), "merge task kernel");
    check(int'(mt_sub.argc) == cnt[s], "merge task argument count");
    for (int k = 0; k < cnt[s]; k++)
      check(mt_sub.args[k] == exp_vals[s][k], $sformatf("merge value %0d of group %0d", k, s));
    check(mt_sub.irq == s[0], "merge task interrupt flag");
    emitted++;
  end
  always @(negedge clk) mt_ready = ($urandom_range(0, 3) != 0);

  initial begin
    int slots [$]; int pending [$];
    alloc_req = 0; dep_valid = 0; alloc_meta = '0; dep_slot = '0; dep_value = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!ready_o, "busy while initialising");
    wait (ready_o);
    @(negedge clk);
    check(free_groups == S, "all groups free after init");
    for (int round = 0; round < 4; round++) begin
      // allocate all groups
      slots.delete();
      for (int g = 0; g < S; g++) begin
        @(negedge clk);
        alloc_req = 1;
        check(alloc_gnt, "allocation granted");
        @(posedge clk);
        slots.push_back(int'(alloc_slot));
        @(negedge clk);
        alloc_req = 0;
      end
      // now set meta: the dest index we check equals the slot, so allocate
      // again after learning slots is not possible; meta was written with the
      // fields below, computed from the slot the grant returned.
      check(!alloc_gnt, "no allocation when all groups are taken");
      pending.delete();
      foreach (slots[i])
        for (int k = 0; k < cnt[slots[i]]; k++) pending.push_back(slots[i] * 8 + k);
      pending.shuffle();
      // deposits must be in member order per group: sort within group
      begin
        int nextk [S];
        for (int i = 0; i < S; i++) nextk[i] = 0;
        while (pending.size() != 0) begin
          int e, s;
          e = pending.pop_front();
          s = e / 8;
          @(negedge clk);
          dep_valid = 1; dep_slot = 4'(s);
          dep_value = {$urandom, $urandom};
          exp_vals[s][nextk[s]] = dep_value;
          nextk[s]++;
          do @(posedge clk); while (!dep_ready);
          @(negedge clk);
          dep_valid = 0;
        end
      end
      expected_emits += S;
      repeat (40) @(posedge clk);
      check(emitted == expected_emits, $sformatf("round %0d: %0d merge tasks", round, emitted));
      check(free_groups == S, "groups returned to free list");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // meta for an allocation: derived from the slot being granted
  always_comb begin
    alloc_meta        = '0;
    alloc_meta.count  = cnt_t'(cnt[alloc_slot]);
    alloc_meta.kernel = kid_t'(int'(alloc_slot) + 100);
    alloc_meta.dest   = '{kind: DST_PE, idx: 16'(alloc_slot)};
    alloc_meta.irq    = alloc_slot[0];
  end
  initial for (int i = 0; i < S; i++) cnt[i] = 1 + (i % 4);
endmodule
