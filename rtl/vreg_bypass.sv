// Element-granular hazard detection and bypass for the 2-D vector register file.
//
// A row and a column of the same bank share exactly one element, so a write
// in one mode followed by a read in the other mode is a data hazard on that
// single byte, while a read in the same mode hazards on all or none of the
// bytes. This unit works element by element: for every lane k of the read it
// finds the element (row register, column) that lane reads, checks whether
// the pending write covers that element, and if so replaces the byte with the
// write's byte for that element. The per-lane hit mask tells the pipeline
// which bytes were forwarded (or, with forwarding disabled, that it must
// stall). Chain instances oldest-first when more than one write is pending.
// Purely combinational.
//
// The need for hazard handling on a row/column mode switch, and bypassing as
// the remedy, follow the document; the element-granular form is this
// design's choice.
module vreg_bypass
  import vreg_pkg::*;
(
  input  vreg_addr_t          raddr,   // address the read port uses
  input  vword_t              rdata,   // value read from the register file
  input  vreg_wr_t            wr,      // pending write, not yet in the file
  output vword_t              data,    // read value with overlapping bytes forwarded
  output logic [0:LANES-1]    hit,     // lane k was forwarded
  output logic                xmode    // a hit where read and write modes differ
);

  localparam int unsigned LW = $clog2(LANES);

  logic [REG_AW-1:0] rbase, wbase;
  logic [LW-1:0]     rcol, wcol;
  logic [REG_AW-1:0] er;   // row register of the element read by lane k
  logic [LW-1:0]     ec;   // column of that element
  logic [LW-1:0]     wl;   // lane of the write that carries element (er, ec)
  logic              cov;

  assign rbase = {raddr.num[REG_AW-1:LW], LW'(0)};
  assign rcol  = raddr.num[LW-1:0];
  assign wbase = {wr.addr.num[REG_AW-1:LW], LW'(0)};
  assign wcol  = wr.addr.num[LW-1:0];

  always_comb begin
    er = '0;
    ec = '0;
    wl = '0;
    cov = 1'b0;
    for (int k = 0; k < LANES; k++) begin
      if (raddr.mode == MODE_ROW) begin
        er = raddr.num;
        ec = LW'(k);
      end else begin
        er = rbase + REG_AW'(k);
        ec = rcol;
      end
      if (wr.addr.mode == MODE_ROW) begin
        cov = (er == wr.addr.num);
        wl  = ec;
      end else begin
        cov = ({er[REG_AW-1:LW], LW'(0)} == wbase) && (ec == wcol);
        wl  = er[LW-1:0];
      end
      hit[k]  = wr.valid && cov;
      data[k] = hit[k] ? wr.data[wl] : rdata[k];
    end
    xmode = (|hit) && (raddr.mode != wr.addr.mode);
  end

endmodule
