// tuple_scheduler: the N-tuple scheduler of the LutC mode (arbiter logic and
// crossbar).
//
// A batch of up to N tuples (addr1, addr2, sym) is loaded at once; each tuple
// stays pending until it has been issued. Every cycle the arbiter looks at the
// pending tuples and, for each of the NARR arrays, issues one transposed search:
//   * a tuple goes to array id/8, where id is addr1 after addr1_remap, and
//     searches column slot (id%8)*8 + addr2/16 of that array;
//   * tuples with the same id, the same addr2/16 and the same sym are answered
//     by the same search (one lane per addr2 % 16), so they are issued together;
//   * when an array has several such groups pending, the largest group goes
//     first (parallel execution first), ties to the group whose first tuple
//     comes earliest in the batch; the rest wait for a later cycle.
// The crossbar output of array a is req_valid[a] with req[a]: the slot, the
// symbol, the mask of tuples served, the lane of every tuple and the batch's
// base position. busy stays high while anything of the batch is pending.
// load is taken only when nothing is pending. Synchronous active-low reset.
module tuple_scheduler
  import iscoder_pkg::*;
#(
  parameter int unsigned N    = N_TUPLES,
  parameter int unsigned NARR = ARRAYS_PE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  tuple_t [N-1:0]        tuples,
  input  logic   [N-1:0]        tvalid,
  input  logic   [POS_W-1:0]    base,
  output logic                  busy,
  output logic   [NARR-1:0]     req_valid,
  output lut_req_t [NARR-1:0]   req
);

  tuple_t [N-1:0]       tup_q;
  logic   [N-1:0]       pend_q, grant;
  logic   [POS_W-1:0]   base_q;

  logic [N-1:0][LUT_SYM_W-1:0] nid;
  logic [N-1:0][3:0]           arr;
  logic [N-1:0][2:0]           blk;
  logic [N-1:0][LUT_SYM_W+3+LUT_SYM_W-1:0] key;   // {id, addr2/16, sym}
  logic [N-1:0][$clog2(N):0]   cnt;

  for (genvar n = 0; n < int'(N); n++) begin : g_map
    addr1_remap u_remap (
      .old_id  (tup_q[n].addr1),
      .new_id  (nid[n]),
      .array_id(arr[n]),
      .block_id(blk[n])
    );
    assign key[n] = {nid[n], tup_q[n].addr2[6:4], tup_q[n].sym};
  end

  // size of the group every pending tuple belongs to
  always_comb begin
    for (int n = 0; n < int'(N); n++) begin
      cnt[n] = '0;
      for (int m = 0; m < int'(N); m++)
        if (pend_q[n] && pend_q[m] && key[n] == key[m]) cnt[n] = cnt[n] + 1'b1;
    end
  end

  // per array: pick the winning group, grant all its tuples
  always_comb begin
    grant     = '0;
    req_valid = '0;
    req       = '0;
    for (int a = 0; a < int'(NARR); a++) begin
      logic              found;
      int                win;
      found = 1'b0;
      win   = 0;
      for (int n = 0; n < int'(N); n++) begin
        if (pend_q[n] && arr[n] == 4'(a)) begin
          if (!found || cnt[n] > cnt[win]) begin
            found = 1'b1;
            win   = n;
          end
        end
      end
      if (found) begin
        req_valid[a]   = 1'b1;
        req[a].slot    = {blk[win], tup_q[win].addr2[6:4]};
        req[a].sym     = tup_q[win].sym;
        req[a].base    = base_q;
        for (int n = 0; n < int'(N); n++) begin
          req[a].lane[n] = tup_q[n].addr2[3:0];
          if (pend_q[n] && key[n] == key[win]) begin
            req[a].mask[n] = 1'b1;
            grant[n]       = 1'b1;
          end
        end
      end
    end
  end

  assign busy = |pend_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_q <= '0;
      tup_q  <= '0;
      base_q <= '0;
    end else if (load && !busy) begin
      pend_q <= tvalid;
      tup_q  <= tuples;
      base_q <= base;
    end else begin
      pend_q <= pend_q & ~grant;
    end
  end

  // every issued tuple belongs to exactly one array's search
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~pend_q) == '0);

endmodule
