// 2/3 cell: divides its input clock by 2, or by 3 once per output cycle.
//
// One cell of the modular divider chain.  Each output cycle of the cell lasts
// two input cycles (phases 0 and 1).  At the end of phase 0 the cell samples
// mod_in: if mod_in and p are both 1 the cycle is stretched by a third input
// cycle (phase 2, the "swallow").  fo is high during phase 0 only, so its rising
// edge marks the start of each output cycle and clocks the next cell.  mod_out is
// high for exactly one input cycle (phase 1) in every output cycle in which mod_in
// was sampled high, and is 0 otherwise:
//   mod_in = 0            -> fo = ck/2, mod_out = 0
//   mod_in = 1            -> fo = mod_out period = ck/(2+p)
//   time(mod_out = 1) = 1 input period, time(mod_out = 0) = (1 + p*mod_in) periods.
// mod_out drives the mod_in of the previous (faster) cell; because it changes only
// on this cell's clock edges, which are the start edges of the previous cell's
// output cycles, it stays stable over one whole output cycle of that cell.
//
// The cell function and these timing relations follow the divider described; the
// transistor-level latches (source-coupled AND-latches, and the faster variant used
// for the first stage) are replaced by edge-triggered flip-flops on the rising
// edge of ck, which is this design's own choice, as is the asynchronous,
// active-high reset (phase 0, fo high, mod_out low).
module cell23 (
  input  logic ck,       // input clock of this cell (f_in or fo of the previous cell)
  input  logic rst,      // asynchronous reset, active high
  input  logic p,        // ratio control bit of this cell
  input  logic mod_in,   // modulus control from the next (slower) cell
  output logic fo,       // output clock, to the next cell
  output logic mod_out   // modulus control to the previous (faster) cell
);
  typedef enum logic [1:0] {PH0 = 2'd0, PH1 = 2'd1, PH2 = 2'd2} phase_e;

  phase_e ph;
  logic   swallow;

  always_ff @(posedge ck or posedge rst) begin
    if (rst) begin
      ph      <= PH0;
      swallow <= 1'b0;
      fo      <= 1'b1;
      mod_out <= 1'b0;
    end else begin
      unique case (ph)
        PH0: begin
          ph      <= PH1;
          swallow <= p & mod_in;
          mod_out <= mod_in;
          fo      <= 1'b0;
        end
        PH1: begin
          mod_out <= 1'b0;
          if (swallow) begin
            ph <= PH2;
            fo <= 1'b0;
          end else begin
            ph <= PH0;
            fo <= 1'b1;
          end
        end
        default: begin
          ph      <= PH0;
          mod_out <= 1'b0;
          fo      <= 1'b1;
        end
      endcase
    end
  end
endmodule
