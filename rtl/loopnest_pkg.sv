// loopnest_pkg: types and constants shared by the loop-nest controllers,
// the kernel unit and the top.
//
// kernel_e names the iteration domains that a kernel unit can enumerate: the
// four benchmark loop structures (rectangle, cuboid, triangle, tetrahedron).
// kernel_dims() gives the depth of the loop nest, which sets how many
// iterators form an array address. All kernels index the array by
// concatenating their iterators, most significant first, each W bits wide
// (a design choice: it needs no multiplier in the address path).
package loopnest_pkg;

  typedef enum logic [1:0] {
    K_RECT2D = 2'd0,   // for i<N, for j<M
    K_RECT3D = 2'd1,   // for i<N, for j<M, for k<K
    K_TRI2D  = 2'd2,   // for i<N, for j<=i
    K_TRI3D  = 2'd3    // for i<N, for j<=i, for k<=j
  } kernel_e;

  function automatic int unsigned kernel_dims(kernel_e k);
    return (k == K_RECT3D || k == K_TRI3D) ? 3 : 2;
  endfunction

endpackage
