// tb_pkg: testbench helpers shared by several testbenches.
package tb_pkg;
  // Payload word w (0..23) of cell n of test stream s
  function automatic logic [15:0] tb_payload(int s, int n, int w);
    return 16'((s * 16'h3001) ^ (n * 16'h0107) ^ (w * 16'h0a21) ^ 16'h5a00);
  endfunction

  // UNI header with the given VPI/VCI (GFC, PT, CLP zero)
  function automatic logic [31:0] tb_hdr(int vpi, int vci);
    return {4'h0, 8'(vpi), 16'(vci), 3'b000, 1'b0};
  endfunction

  // CAM entry value for the given VPI/VCI
  function automatic logic [31:0] tb_cam(int vpi, int vci);
    return {7'd0, 1'b1, 8'(vpi), 16'(vci)};
  endfunction
endpackage
