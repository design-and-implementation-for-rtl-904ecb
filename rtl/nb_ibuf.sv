// Internal buffer between a second-stage check elementary step and its
// variable node unit. The check step delivers up to two new (non-redundant)
// elements per cycle, the VNU takes one per cycle. Each cycle the oldest
// available element goes to the VNU: a buffered one if there is any, else
// the first element arriving in that cycle. The rest is queued. This covers
// the three cases of the controller: two unique elements (one to the VNU, one
// queued), one unique element (it goes straight on, the redundant one was
// already dropped by the check step) and none (the VNU is fed from the queue).
// Since the check step produces NM elements in at least NM/2 cycles while the
// VNU drains one per cycle, NM/2 entries are enough (DEPTH default); an
// assertion guards against overflow.
//
// Interface: in_vld[1:0]/in_elem[1:0] (in_vld[1] may be set without
// in_vld[0]); out_vld/out_elem combinational; clear empties the queue.
module nb_ibuf
  import nb_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic  [1:0] in_vld,
  input  elem_t [1:0] in_elem,
  output logic        out_vld,
  output elem_t       out_elem,
  output logic        empty
);
  localparam int unsigned CW = $clog2(DEPTH + 3);

  elem_t [DEPTH-1:0]   q;
  logic  [CW-1:0]      cnt;
  elem_t [DEPTH+1:0]   lst;
  logic  [CW-1:0]      tot;

  always_comb begin
    lst = '0;
    for (int i = 0; i < DEPTH; i++) lst[i] = q[i];
    tot = cnt;
    for (int k = 0; k < 2; k++)
      if (in_vld[k]) begin
        lst[tot] = in_elem[k];
        tot      = tot + CW'(1);
      end
    out_vld  = (tot != '0);
    out_elem = lst[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      cnt <= '0;
    end else if (clear) begin
      cnt <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= lst[i+1];
      cnt <= (tot != '0) ? tot - CW'(1) : '0;
    end
  end

  assign empty = (cnt == '0);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !clear |-> (tot <= CW'(DEPTH + 1)));
endmodule
