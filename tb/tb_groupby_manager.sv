// Testbench of groupby_manager: a chain of three managers (IDs 0..2) for
// four queries, linked west to east as in the full design. Configuration
// tuples (sometimes with GROUP BY on a random attribute), punctuations and
// data tuples with random valid flags and a few distinct attribute values
// enter the west end. A reference walks each tuple through the managers in
// order: a manager claims a tuple flagged for its query if it has no
// grouping, has no group yet (the tuple then sets the group), or its group
// value matches; a claimed flag is cleared towards the east. Manager g must
// show its north result g+1 clock edges after the tuple enters, and the
// east end must show the remaining flags after three edges.
module tb_groupby_manager;
  import sq_pkg::*;
  localparam int NQ = 4, NG = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          c_cfg[NG+1], c_punct[NG+1];
  logic [NQ-1:0] c_vflags[NG+1];
  tuple_t        c_data[NG+1];
  logic          n_cfg[NG], n_punct[NG], n_valid[NG], group_set[NG];
  tuple_t        n_data[NG];
  attr_t         group_val[NG];

  for (genvar g = 0; g < NG; g++) begin : g_m
    groupby_manager #(.N_Q(NQ), .ID(g)) u_m (
      .clk, .rst,
      .w_cfg(c_cfg[g]), .w_punct(c_punct[g]), .w_vflags(c_vflags[g]), .w_data(c_data[g]),
      .e_cfg(c_cfg[g+1]), .e_punct(c_punct[g+1]), .e_vflags(c_vflags[g+1]), .e_data(c_data[g+1]),
      .n_cfg(n_cfg[g]), .n_punct(n_punct[g]), .n_valid(n_valid[g]), .n_data(n_data[g]),
      .group_val(group_val[g]), .group_set(group_set[g]));
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state per manager
  bit m_en[NG], m_gb[NG], m_set[NG]; int m_at[NG], m_q[NG]; attr_t m_val[NG];
  // expected outputs per input index
  bit x_claim[$][NG];
  bit x_cfg[$], x_punct[$];
  tuple_t x_data[$];
  logic [NQ-1:0] x_east[$];
  int claims = 0, new_groups = 0, rejected = 0, bypassed = 0;

  initial begin
    foreach (m_en[g]) begin m_en[g] = 0; m_gb[g] = 0; m_set[g] = 0; m_at[g] = 0; m_q[g] = 0; m_val[g] = 0; end
    c_cfg[0] = 0; c_punct[0] = 0; c_vflags[0] = '0; c_data[0] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int kind;
      logic [NQ-1:0] fl;
      bit cl[NG];
      kind = (n < NG) ? 0 : $urandom % 40;   // 0: configuration, 1: punctuation, else data
      @(negedge clk);
      c_cfg[0] = kind == 0; c_punct[0] = kind == 1;
      fl = (kind > 1) ? NQ'($urandom) : '0;
      c_vflags[0] = fl;
      if (kind == 0) begin
        int g, q, at;
        bit en, gb;
        g = (n < NG) ? n : $urandom % NG;
        q = $urandom % 2;   // managers share queries 0 and 1
        at = $urandom % 4; en = ($urandom % 8) != 0; gb = ($urandom % 3) != 0;
        c_data[0] = {16'(g), 4'h0, 95'($urandom), 3'(0), 2'(q), 4'(0), 2'(at), gb, en};
        m_en[g] = en; m_gb[g] = gb; m_at[g] = at; m_q[g] = q; m_set[g] = 0;
      end else begin
        for (int k = 0; k < 4; k++) c_data[0][127-32*k -: 32] = $urandom % 3;
      end
      for (int g = 0; g < NG; g++) begin
        attr_t v;
        v = c_data[0][127-32*m_at[g] -: 32];
        cl[g] = 0;
        if (kind != 0 && m_en[g] && fl[m_q[g]]) begin
          if (!m_gb[g]) cl[g] = 1;
          else if (!m_set[g]) begin cl[g] = 1; m_set[g] = 1; m_val[g] = v; new_groups++; end
          else if (m_val[g] == v) cl[g] = 1;
          else rejected++;
          if (cl[g]) begin fl[m_q[g]] = 1'b0; claims++; end
        end
      end
      if (fl != 0) bypassed++;
      x_claim.push_back(cl); x_cfg.push_back(c_cfg[0]); x_punct.push_back(c_punct[0]);
      x_data.push_back(c_data[0]); x_east.push_back(fl);
      @(posedge clk); #1;
      // after this edge manager g shows input n-g
      for (int g = 0; g < NG; g++) begin
        int i;
        i = x_claim.size() - 1 - g;
        if (i >= 0) begin
          checks++;
          if (n_valid[g] !== x_claim[i][g] || n_cfg[g] !== x_cfg[i] || n_punct[g] !== x_punct[i] ||
              n_data[g] !== x_data[i]) begin
            failures++;
            $display("FAIL n=%0d manager %0d claim %0b exp %0b", n, g, n_valid[g], x_claim[i][g]);
          end
        end
      end
      if (x_claim.size() >= NG) begin
        checks++;
        if (c_vflags[NG] !== x_east[x_claim.size() - NG]) begin
          failures++;
          $display("FAIL n=%0d east flags %b exp %b", n, c_vflags[NG], x_east[x_claim.size() - NG]);
        end
      end
    end
    checks++;
    if (claims < 500 || new_groups < 20 || rejected < 200 || bypassed < 200) begin
      failures++;
      $display("FAIL coverage claims=%0d groups=%0d rejected=%0d bypassed=%0d", claims, new_groups, rejected, bypassed);
    end
    $display("groupby: claims=%0d new_groups=%0d rejected=%0d bypassed=%0d", claims, new_groups, rejected, bypassed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
