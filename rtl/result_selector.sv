// result_selector: collects the results of the SRAM accelerators and writes
// them into the output scratchpad.
//
// MatchC mode: every accelerator a is one MatchC PE with its own block. When
// its iteration completes (m_valid[a]) the (length, pointer) pair is written
// as one word {length, pointer} to bank a at the next free address; m_count[a]
// counts the results of bank a since clear.
//
// LutC mode: one cycle after a transposed search, accelerator a presents the
// match of every lane (l_hit, l_pos) together with the request that started
// it (l_tag: which tuples of the batch it served and each tuple's lane).
// Tuple n of a batch whose tuple 0 sits at block position base is symbol k =
// base+n; its position goes to bank k % BANKS, address k / BANKS, taken from
// lane l_tag.lane[n]. The word is {miss, 8'b0, pos}: miss is set when the
// symbol was not found in its table row. The two leading symbols of a block,
// which LutC passes through uncoded, arrive on h_en and go to positions 0
// and 1. l_written counts the LutC words written since clear.
// All writes of a cycle go to different banks (tuples n of one batch differ in
// k % BANKS, and batches do not overlap in time), which the assertion checks.
module result_selector
  import iscoder_pkg::*;
#(
  parameter int unsigned NARR  = ARRAYS_PE,
  parameter int unsigned BANKS = 16,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  mode_e                                  mode,
  input  logic                                   clear,
  // MatchC
  input  logic       [NARR-1:0]                  m_valid,
  input  match_res_t [NARR-1:0]                  m_res,
  // LutC
  input  logic       [NARR-1:0]                  l_valid,
  input  lut_req_t   [NARR-1:0]                  l_tag,
  input  logic       [NARR-1:0][LANES-1:0]       l_hit,
  input  logic       [NARR-1:0][LANES-1:0][LUT_SYM_W-1:0] l_pos,
  input  logic                                   h_en,
  input  logic       [LUT_SYM_W-1:0]             h_sym0,
  input  logic       [LUT_SYM_W-1:0]             h_sym1,
  // output scratchpad
  output logic       [BANKS-1:0]                 wr_en,
  output logic       [BANKS-1:0][$clog2(DEPTH)-1:0] wr_addr,
  output logic       [BANKS-1:0][15:0]           wr_data,
  output logic       [NARR-1:0][POS_W-1:0]       m_count,
  output logic       [POS_W:0]                   l_written
);

  logic [$clog2(BANKS+1)-1:0] n_lut;
  logic [BANKS-1:0]           lut_bank_used;

  always_comb begin
    logic [POS_W-1:0] k;
    int               b;
    k             = '0;
    b             = 0;
    wr_en         = '0;
    wr_addr       = '0;
    wr_data       = '0;
    n_lut         = '0;
    lut_bank_used = '0;
    if (mode == MODE_MATCHC) begin
      for (int a = 0; a < int'(NARR) && a < int'(BANKS); a++) begin
        wr_en[a]   = m_valid[a];
        wr_addr[a] = $clog2(DEPTH)'(m_count[a]);
        wr_data[a] = m_res[a];
      end
    end else begin
      if (h_en) begin
        wr_en[0]   = 1'b1;
        wr_data[0] = 16'(h_sym0);
        wr_en[1]   = 1'b1;
        wr_data[1] = 16'(h_sym1);
        n_lut      = 2;
      end
      for (int a = 0; a < int'(NARR); a++) begin
        if (l_valid[a]) begin
          for (int n = 0; n < int'(N_TUPLES); n++) begin
            if (l_tag[a].mask[n]) begin
              k = l_tag[a].base + POS_W'(n);
              b = int'(k) % int'(BANKS);
              lut_bank_used[b] = 1'b1;
              wr_en[b]   = 1'b1;
              wr_addr[b] = $clog2(DEPTH)'(int'(k) / int'(BANKS));
              wr_data[b] = {~l_hit[a][l_tag[a].lane[n]], 8'b0, l_pos[a][l_tag[a].lane[n]]};
              n_lut      = n_lut + 1'b1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      m_count   <= '0;
      l_written <= '0;
    end else begin
      for (int a = 0; a < int'(NARR); a++)
        if (mode == MODE_MATCHC && m_valid[a]) m_count[a] <= m_count[a] + 1'b1;
      if (mode == MODE_LUTC) l_written <= l_written + (POS_W+1)'(n_lut);
    end
  end

  // no two results of one cycle share a bank
  always_comb begin
    int tot;
    tot = 0;
    for (int a = 0; a < int'(NARR); a++)
      if (l_valid[a]) tot += $countones(l_tag[a].mask);
    if (rst_n && mode == MODE_LUTC)
      assert (tot == $countones(lut_bank_used)) else $error("LutC results collide in a bank");
  end

endmodule
