// xs3_pkg: shared types for the serial BCD to excess-3 converters.
//
// The Mealy converter walks a seven-state graph (S0..S6); one state per
// bit position group of the 4-bit serial word, least significant bit first.
// Bit time t0 is spent in S0, t1 in S1/S2, t2 in S3/S4, t3 in S5/S6, after
// which the machine is back in S0. The encoding is this design's choice.
package xs3_pkg;

  typedef enum logic [2:0] {
    S0 = 3'd0,
    S1 = 3'd1,
    S2 = 3'd2,
    S3 = 3'd3,
    S4 = 3'd4,
    S5 = 3'd5,
    S6 = 3'd6
  } xs3_state_t;

  // Next state and output of the Mealy converter for one serial input bit.
  // Rows follow the state table: (state, x) -> (next state, z).
  typedef struct packed {
    xs3_state_t ns;
    logic       z;
  } xs3_step_t;

  function automatic xs3_step_t xs3_step(xs3_state_t ps, logic x);
    xs3_step_t r;
    unique case (ps)
      S0:      begin r.ns = x ? S2 : S1; r.z = ~x;   end
      S1:      begin r.ns = x ? S4 : S3; r.z = ~x;   end
      S2:      begin r.ns = S4;          r.z = x;    end
      S3:      begin r.ns = S5;          r.z = x;    end
      S4:      begin r.ns = x ? S6 : S5; r.z = ~x;   end
      S5:      begin r.ns = S0;          r.z = x;    end
      S6:      begin r.ns = S0;          r.z = ~x;   end
      default: begin r.ns = S0;          r.z = 1'b0; end
    endcase
    return r;
  endfunction

endpackage
