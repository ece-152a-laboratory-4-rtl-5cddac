// taillight_model_pkg: cycle-level reference model of the tail-light state
// machine, written independently of the RTL for the testbenches.
//
// The model keeps a turn-step counter per side and a flash phase for the
// hazard lights instead of named states. step() applies one clock edge with
// the switch values sampled at that edge and returns the six lights the
// machine shows after it: {left[2:0], right[2:0]}, bit 0 of a side innermost.
package taillight_model_pkg;

  class tail_model;
    int unsigned lstep, rstep;   // 0..3, 0 = dark step of the sequence
    bit          flash_on;       // hazard lights currently in the "on" half

    function new();
      reset();
    endfunction

    function void reset();
      lstep = 0; rstep = 0; flash_on = 0;
    endfunction

    // Lights of a turning side: step n lights the n innermost lamps.
    static function logic [2:0] seq(int unsigned n);
      return 3'((8'h07 >> (3 - n)) & 8'h07);
    endfunction

    function logic [5:0] step(bit l, bit r, bit b, bit h);
      logic [2:0] ol, orr;
      if (b && (l != r)) begin
        flash_on = 0;
        if (l) begin
          lstep = (lstep + 1) % 4; rstep = 0;
          ol = seq(lstep); orr = 3'b111;
        end else begin
          rstep = (rstep + 1) % 4; lstep = 0;
          ol = 3'b111; orr = seq(rstep);
        end
      end else if (b) begin
        lstep = 0; rstep = 0; flash_on = 0;
        ol = 3'b111; orr = 3'b111;
      end else if (h || (l && r)) begin
        lstep = 0; rstep = 0;
        flash_on = !flash_on;
        ol = {3{flash_on}}; orr = {3{flash_on}};
      end else if (l) begin
        lstep = (lstep + 1) % 4; rstep = 0; flash_on = 0;
        ol = seq(lstep); orr = 3'b000;
      end else if (r) begin
        rstep = (rstep + 1) % 4; lstep = 0; flash_on = 0;
        ol = 3'b000; orr = seq(rstep);
      end else begin
        lstep = 0; rstep = 0; flash_on = 0;
        ol = 3'b000; orr = 3'b000;
      end
      return {ol, orr};
    endfunction
  endclass

endpackage
