// sel_case: one configuration of the select-logic test. It instantiates
// select_logic with the given window size and ALU count, applies 20000
// random cases, compares with the age/priority reference and raises 'done'.
module sel_case #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned NFU     = 4
) (
  output logic done
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned OFF_W = (NFU > 1) ? $clog2(NFU) : 1;
  logic [ENTRIES-1:0] ready, issue_mask, exp_mask;
  logic [IDX_W-1:0]   head;
  logic [NFU-1:0]     fu_busy, grant, exp_grant;
  logic [OFF_W-1:0]   offset;
  logic [IDX_W-1:0]   grant_idx [NFU];
  int exp_idx [NFU];
  int checks = 0, failures = 0;
  int n_contended = 0;

  select_logic #(.ENTRIES(ENTRIES), .NFU(NFU)) dut (
    .ready, .head, .fu_busy, .offset, .grant, .grant_idx, .issue_mask);

  task automatic reference();
    int age_list [$];
    int fu_list  [$];
    exp_grant = '0; exp_mask = '0;
    for (int f = 0; f < NFU; f++) exp_idx[f] = 0;
    for (int age = 0; age < ENTRIES; age++)
      if (ready[(int'(head) + age) % ENTRIES]) age_list.push_back((int'(head) + age) % ENTRIES);
    for (int pr = 0; pr < NFU; pr++)
      if (!fu_busy[(int'(offset) + pr) % NFU]) fu_list.push_back((int'(offset) + pr) % NFU);
    if (age_list.size() > fu_list.size()) n_contended++;
    for (int k = 0; k < fu_list.size() && k < age_list.size(); k++) begin
      exp_grant[fu_list[k]] = 1'b1;
      exp_idx[fu_list[k]]   = age_list[k];
      exp_mask[age_list[k]] = 1'b1;
    end
  endtask

  initial begin
    done = 0;
    repeat (20000) begin
      // sparse and dense ready vectors
      ready = '0;
      for (int e = 0; e < ENTRIES; e++)
        ready[e] = ($urandom_range(15) < (($urandom_range(1) == 1) ? 1 : 8));
      head    = IDX_W'($urandom);
      fu_busy = ($urandom_range(2) == 0) ? NFU'($urandom) : '0;
      offset  = OFF_W'($urandom_range(NFU - 1));
      #1;
      reference();
      checks++;
      if (grant !== exp_grant || issue_mask !== exp_mask) begin
        failures++;
        if (failures < 10) $display("FAIL grant %b exp %b", grant, exp_grant);
      end
      for (int f = 0; f < NFU; f++)
        if (exp_grant[f]) begin
          checks++;
          if (int'(grant_idx[f]) != exp_idx[f]) begin
            failures++;
            if (failures < 10) $display("FAIL alu%0d idx %0d exp %0d", f, grant_idx[f], exp_idx[f]);
          end
        end
    end
    checks++;
    if (n_contended == 0) failures++;
    done = 1;
  end
endmodule
