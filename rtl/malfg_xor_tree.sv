// malfg_xor_tree: balanced tree of two-input XOR gates over N inputs.
//
// Level 0 is the N inputs. Each further level XORs neighbouring pairs
// (0,1), (2,3), ... of the level below; an odd element left over at the end
// passes up unchanged. After ceil(log2 N) levels one bit remains. For 20
// inputs the levels hold 20, 10, 5, 3, 2 and 1 values: inputs 0..15 form a
// full four-level tree and inputs 16..19 a two-level one, joined by the last
// gate, so the depth is ceil(log2 N) gates instead of N-1 for a chain.
//
// Interface: x is the N-bit input, y the XOR of all of its bits.
// Combinational.
module malfg_xor_tree #(
  parameter int unsigned N = malfg_pkg::M_BITS
) (
  input  logic [N-1:0] x,
  output logic         y
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Number of values on level l.
  function automatic int unsigned count(int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [count(l)-1:0] v;
    if (l == 0) begin : g_in
      assign v = x;
    end else begin : g_pair
      for (genvar i = 0; i < count(l); i++) begin : g_node
        if (2 * i + 1 < count(l - 1)) begin : g_xor
          assign v[i] = g_lvl[l-1].v[2*i] ^ g_lvl[l-1].v[2*i+1];
        end else begin : g_pass
          assign v[i] = g_lvl[l-1].v[2*i];
        end
      end
    end
  end

  assign y = g_lvl[LEVELS].v[0];

endmodule
