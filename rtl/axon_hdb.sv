// HDB: header build.
//
// Gives header byte `off` (0..18) of a data cell of the congram described
// by `cfg`, for page j and packet i: all encapsulation levels at once - the
// network header template, MCHIP and ALTP types, congram and request ids,
// segment group limit and index, segment limit, page and packet indices.
// Combinational; the sequencer registers the byte it picks.
//
// Only the header fields of the transmit CSR are read here; lint reports
// the others (rate, settings, key) as unused.
module axon_hdb
  import axon_pkg::*;
(
  input  tx_cfg_t     cfg,
  input  logic [15:0] j,
  input  logic [4:0]  i,
  input  logic [5:0]  off,
  output logic [7:0]  d
);
  always_comb begin
    unique case (off)
      6'd0: d = cfg.nethdr[39:32];
      6'd1: d = cfg.nethdr[31:24];
      6'd2: d = cfg.nethdr[23:16];
      6'd3: d = cfg.nethdr[15:8];
      6'd4: d = cfg.nethdr[7:0];
      6'd5: d = MTYPE_DATA;
      6'd6: d = ATYPE_DATA;
      6'd7: d = cfg.c[15:8];
      6'd8: d = cfg.c[7:0];
      6'd9: d = cfg.q[15:8];
      6'd10: d = cfg.q[7:0];
      6'd11: d = cfg.g;
      6'd12: d = cfg.k;
      6'd13: d = cfg.sk[15:8];
      6'd14: d = cfg.sk[7:0];
      6'd15: d = j[15:8];
      6'd16: d = j[7:0];
      6'd17: d = 8'h00;
      6'd18: d = {3'b000, i};
      default: d = 8'h00;
    endcase
  end
endmodule
