// st_search: binary search of the sorted syndrome table.
//
// Because the table is sorted by ascending syndrome, the entry whose first
// B bits equal the key is found by halving the interval [lo, hi) of
// candidate addresses: read the middle entry, stop on a match, otherwise
// keep the lower or upper half. A table of `size` entries needs at most
// floor(log2 size) + 1 probes. The controller drives the read port of
// st_memory; each probe costs the memory's read latency (N_ST clocks),
// since the next address is issued in the same clock the previous word is
// compared. A search of an empty interval ends with found = 0.
// Interface: pulse start with key and size (number of valid entries);
// key and size are captured. done pulses for one clock
// P*N_ST + 1 clocks later (P probes), with found, the matching entry and
// the probe count valid from then until the next start.
// Binary search over the sorted table follows the published algorithm; the
// interval bookkeeping and the size input are this design's.
module st_search #(
  parameter int unsigned DEPTH = iecc_pkg::DEPTH_DEF,
  parameter int unsigned W     = iecc_pkg::entry_width(iecc_pkg::B_DEF, iecc_pkg::K_DEF, iecc_pkg::T_DEF),
  parameter int unsigned B     = iecc_pkg::B_DEF,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [B-1:0]  key,
  input  logic [AW:0]   size,
  output logic          busy,
  // read port of the table
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic          rvalid,
  input  logic [W-1:0]  rdata,
  // result
  output logic          done,
  output logic          found,
  output logic [W-1:0]  entry,
  output logic [7:0]    probes
);
  typedef enum logic [0:0] {S_IDLE, S_WAIT} state_e;
  state_e      state;
  logic [AW:0] lo, hi, mid;        // current interval [lo, hi) and probe
  logic [AW:0] nlo, nhi, nmid;     // interval after the current compare
  logic [B-1:0] key_q;
  logic [B-1:0] s_rd;
  logic         hit, last;

  assign s_rd = rdata[W-1 -: B];
  assign hit  = (s_rd == key_q);

  always_comb begin
    nlo = lo;
    nhi = hi;
    if (state == S_IDLE) begin
      nlo = '0;
      nhi = size;
    end else if (rvalid && !hit) begin
      if (key_q < s_rd) nhi = mid;
      else              nlo = mid + 1'b1;
    end
    nmid = (AW+1)'((({1'b0, nlo} + {1'b0, nhi}) >> 1));
    last = (nlo >= nhi);
  end

  // a probe is issued on start, and after every miss that leaves a
  // non-empty interval
  assign re    = (state == S_IDLE) ? (start && size != '0)
                                   : (rvalid && !hit && !last);
  assign raddr = nmid[AW-1:0];
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      lo     <= '0;
      hi     <= '0;
      mid    <= '0;
      key_q  <= '0;
      done   <= 1'b0;
      found  <= 1'b0;
      entry  <= '0;
      probes <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          key_q  <= key;
          lo     <= nlo;
          hi     <= nhi;
          mid    <= nmid;
          found  <= 1'b0;
          probes <= 8'd0;
          if (size == '0) done <= 1'b1;
          else begin
            probes <= 8'd1;
            state  <= S_WAIT;
          end
        end
        S_WAIT: if (rvalid) begin
          if (hit) begin
            found <= 1'b1;
            entry <= rdata;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (last) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            lo     <= nlo;
            hi     <= nhi;
            mid    <= nmid;
            probes <= probes + 8'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
