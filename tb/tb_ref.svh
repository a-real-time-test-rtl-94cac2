// tb_ref.svh: reference models written independently of the RTL's package
// functions: HEC by long division of the 32-bit header times x^8, and the
// x^43+1 scrambler one bit at a time.
  function automatic logic [7:0] ref_hec(logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction
  class ref_scr;
    bit hist [$];
    function new(); for (int i = 0; i < 43; i++) hist.push_back(0); endfunction
    // returns line byte for a data byte (scramble) or data byte for a line byte
    function logic [7:0] step(logic [7:0] d, bit descramble);
      logic [7:0] o;
      for (int i = 7; i >= 0; i--) begin
        o[i] = d[i] ^ hist[0];
        void'(hist.pop_front());
        hist.push_back(descramble ? d[i] : o[i]);
      end
      return o;
    endfunction
  endclass
