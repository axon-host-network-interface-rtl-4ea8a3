// PPL: packet presence logic.
//
// Records packet arrivals so that complete pages can be reported to the CAP
// (which sets the page and segment presence bits and lets the host resume).
// Holding a presence bit for every packet of every page would take far too
// much memory; since packets mostly arrive in order, only pages that are
// partly received are tracked. Each of the NPG entries holds a congram
// (CSR index), request id, page index and a 32-bit presence vector.
//
// An arrival (`arr`) of packet i of page j looks for the page's entry and
// allocates a free one if there is none. A good packet sets its bit; a
// corrupted one (`arr_ok` low, from the packet error logic) clears it, since
// its bytes have already overwritten the CMM copy. When all 32 bits are
// set, `pres` pulses with the page and the entry is freed. With no free
// entry the arrival is lost and `ovf` pulses. `alloc` pulses with the entry
// number of a new entry; `flush` frees all entries of a congram (when the
// CAP has closed its request). Entries are read out for the retransmit
// timers and the error logic. One arrival per clock enable.
//
// The entry count is not given by the Axon paper; 8 is assumed.
module axon_ppl
  import axon_pkg::*;
#(
  parameter int unsigned NPG = 8,
  localparam int unsigned EW = $clog2(NPG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arr,
  input  logic          arr_ok,
  input  logic [7:0]    arr_idx,
  input  logic [15:0]   arr_q,
  input  logic [15:0]   arr_j,
  input  logic [4:0]    arr_i,
  input  logic          flush,
  input  logic [7:0]    flush_idx,
  output logic          pres,
  output logic [7:0]    pres_idx,
  output logic [15:0]   pres_q,
  output logic [15:0]   pres_j,
  output logic          ovf,
  output logic          alloc,
  output logic [EW-1:0] alloc_ent,
  output logic [NPG-1:0] ent_v,
  output logic [7:0]    ent_idx [NPG],
  output logic [15:0]   ent_q   [NPG],
  output logic [15:0]   ent_j   [NPG],
  output logic [PKTS_PER_PAGE-1:0] ent_pres [NPG]
);
  logic          hit, has_free;
  logic [EW-1:0] hit_e, free_e, e;
  logic [PKTS_PER_PAGE-1:0] nv;

  always_comb begin
    hit = 1'b0; hit_e = '0; has_free = 1'b0; free_e = '0;
    for (int n = NPG - 1; n >= 0; n--) begin
      if (ent_v[n] && ent_idx[n] == arr_idx && ent_q[n] == arr_q && ent_j[n] == arr_j) begin
        hit = 1'b1; hit_e = EW'(n);
      end
      if (!ent_v[n]) begin
        has_free = 1'b1; free_e = EW'(n);
      end
    end
    e  = hit ? hit_e : free_e;
    nv = (hit ? ent_pres[hit_e] : '0);
    if (arr_ok) nv = nv |  (PKTS_PER_PAGE'(1) << arr_i);
    else        nv = nv & ~(PKTS_PER_PAGE'(1) << arr_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_v <= '0;
      for (int n = 0; n < NPG; n++) begin
        ent_idx[n] <= '0; ent_q[n] <= '0; ent_j[n] <= '0; ent_pres[n] <= '0;
      end
      pres <= 1'b0; pres_idx <= '0; pres_q <= '0; pres_j <= '0;
      ovf <= 1'b0; alloc <= 1'b0; alloc_ent <= '0;
    end else begin
      pres  <= 1'b0;
      ovf   <= 1'b0;
      alloc <= 1'b0;
      if (flush)
        for (int n = 0; n < NPG; n++) if (ent_idx[n] == flush_idx) ent_v[n] <= 1'b0;
      if (arr) begin
        if (!hit && !has_free) begin
          ovf <= 1'b1;
        end else if (&nv) begin
          ent_v[e] <= 1'b0;
          pres     <= 1'b1;
          pres_idx <= arr_idx; pres_q <= arr_q; pres_j <= arr_j;
        end else begin
          ent_v[e]    <= 1'b1;
          ent_idx[e]  <= arr_idx;
          ent_q[e]    <= arr_q;
          ent_j[e]    <= arr_j;
          ent_pres[e] <= nv;
          if (!hit) begin
            alloc     <= 1'b1;
            alloc_ent <= e;
          end
        end
      end
    end
  end
endmodule
